// tb_crc_pe -- self-checking test of one processing element.
//
// Loads a three-state program over the configuration bus (plus writes
// addressed to other PEs, which must be ignored), starts it and checks the
// side outputs every cycle against a cycle model kept here:
//   state 0, ctx 0: r0 = r0 + W_in, east output = FU result        -> state 1
//   state 1, ctx 1: s1 = (r0 < N_in), south data = r0, south status = FU;
//                   branch on the FU status: true -> 0, false -> 2
//   state 2, ctx 2: r1 = r0 * N_in on the north output; west data passes
//                   the east input through, west status the north status
// The loop must leave after exactly ceil(N_in / W_in) iterations (2 cycles
// each). Also checks that nothing is written before cfg_start.
module tb_crc_pe;
  import crc_pkg::*;
  import crc_tb_pkg::*;

  int checks = 0, failures = 0;

  logic        clk = 0, rst = 1;
  logic        cfg_we = 0, cfg_start = 0;
  logic [2:0]  cfg_pe = 0;
  cfg_tgt_e    cfg_tgt = CFG_CTX;
  logic [3:0]  cfg_addr = 0;
  logic [64:0] cfg_wdata = 0;
  logic [31:0] din [4];
  logic [3:0]  sin = 0;
  logic [31:0] dout [4];
  logic [3:0]  sout;
  logic        running, branch_taken;
  logic [3:0]  state, ctx_idx;

  crc_pe #(.PE_ID(2)) dut (
    .clk, .rst, .cfg_we, .cfg_pe, .cfg_tgt, .cfg_addr, .cfg_wdata, .cfg_start,
    .din, .sin, .dout, .sout, .running, .state, .ctx_idx, .branch_taken);

  always #5 clk = ~clk;

  task automatic cfg_write(int pe, cfg_tgt_e tgt, int addr, logic [64:0] data);
    @(negedge clk);
    cfg_we = 1; cfg_pe = 3'(pe); cfg_tgt = tgt; cfg_addr = 4'(addr); cfg_wdata = data;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic expect32(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++; $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic program_pe();
    ctx_f c;
    // decoy writes for other PEs: all-ones words would break the program
    cfg_write(1, CFG_CTX, 0, '1);
    cfg_write(3, CFG_FSM, 0, '1);
    c = idle(); c.op = OP_ADD; c.a = IN_W; c.b = REG(0); c.dwe = 1; c.ddst = 0;
    c.dout[SIDE_E] = O_FU; c.sout[SIDE_E] = O_FU;
    cfg_write(2, CFG_CTX, 0, pack_ctx(c));
    c = idle(); c.op = OP_LT; c.a = REG(0); c.b = IN_N; c.swe = 1; c.sdst = 1;
    c.dout[SIDE_S] = 0; c.sout[SIDE_S] = O_FU;
    cfg_write(2, CFG_CTX, 1, pack_ctx(c));
    c = idle(); c.op = OP_MUL; c.a = REG(0); c.b = IN_N; c.dwe = 1; c.ddst = 1;
    c.dout[SIDE_N] = O_FU; c.dout[SIDE_W] = PASS_E; c.sout[SIDE_W] = PASS_N;
    cfg_write(2, CFG_CTX, 2, pack_ctx(c));
    cfg_write(2, CFG_FSM, 0, 65'(pack_fsm(0, C_FU, 1, 1)));
    cfg_write(2, CFG_FSM, 1, 65'(pack_fsm(1, C_FU, 0, 2)));
    cfg_write(2, CFG_FSM, 2, 65'(pack_fsm(2, C_FU, 2, 2)));
  endtask

  initial begin
    for (int i = 0; i < 4; i++) din[i] = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int round = 0; round < 8; round++) begin
      logic [31:0] w, n, r0;
      int          iters, exp_iters, cyc;
      w = 32'($urandom_range(1, 9));
      n = 32'($urandom_range(1, 60));
      if (round == 0) n = w;   // leaves after one iteration
      din[SIDE_W] = w; din[SIDE_N] = n;
      rst = 1;
      @(negedge clk);
      rst = 0;
      program_pe();
      // not started: state 0 shows r0 + W_in with r0 still 0
      repeat (3) begin
        @(negedge clk);
        #1 expect32("before start", dout[SIDE_E], w);
        checks++;
        if (running) begin failures++; $display("FAIL running before start"); end
      end
      cfg_start = 1;
      @(negedge clk);
      cfg_start = 0;
      r0 = 0; iters = 0; cyc = 0;
      exp_iters = int'((n + w - 1) / w);
      while (state != 2 && cyc < 400) begin
        #1;
        if (state == 0) begin
          expect32("state0 east", dout[SIDE_E], r0 + w);
          r0 = r0 + w;
          iters++;
        end else begin
          expect32("state1 south data", dout[SIDE_S], r0);
          expect32("state1 south status", 32'(sout[SIDE_S]), 32'(r0 < n));
        end
        @(negedge clk);
        cyc++;
      end
      checks += 2;
      if (iters != exp_iters) begin
        failures++; $display("FAIL iterations %0d exp %0d", iters, exp_iters);
      end
      if (cyc != 2 * exp_iters) begin
        failures++; $display("FAIL loop took %0d cycles exp %0d", cyc, 2 * exp_iters);
      end
      for (int k = 0; k < 4; k++) begin
        din[SIDE_E] = $urandom;
        sin = 4'($urandom);
        #1;
        expect32("state2 north product", dout[SIDE_N], mul16(r0, n));
        expect32("state2 west pass", dout[SIDE_W], din[SIDE_E]);
        expect32("state2 west status pass", 32'(sout[SIDE_W]), 32'(sin[SIDE_N]));
        expect32("state2 holds", 32'(state), 32'd2);
        @(negedge clk);
      end
      sin = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
