// tb_crc_array -- end-to-end test of the default 2 x 3 array.
//
// Runs the chaining example of the CRC model, a = b * c and
// d = (e - f) + (g - h), followed by a loop, on all six PEs with the default
// parameters. Subtraction is not an FU operator, so d is formed as
// ~(~(e + g) + (f + h)), which needs no constant:
//
//   PE0 (0,0): e + g          -> east      PE1 (0,1): NOT west -> south
//   PE3 (1,0): f + h          -> east      PE4 (1,1): west + north -> east
//   PE5 (1,2): NOT west = d, kept in r0    PE2 (0,2): b * c = a, kept in r0
//
// All four chained operations and the product complete in the first running
// cycle (state 0); d must appear on the east border in that same cycle.
// Then all FSMs loop in lockstep: state 1 adds d to an accumulator in PE5
// and c to a counter in PE2; in state 2 PE2 compares counter < b and the
// status is routed by pass-through to every other PE, whose FSM branches on
// it (back to state 1, or on to state 3). In state 3 the border shows
// k * d and a, with k = ceil(b / c). Border inputs:
//   north_din[0] = e, west_din[0] = g, west_din[1] = f, south_din[0] = h,
//   north_din[2] = b, east_din[0] = c.
// Every mechanism (boot configuration, context switching, chaining within
// a cycle, pass-through routing, taken and not-taken branches, lockstep
// FSMs) is counted and must occur.
module tb_crc_array;
  import crc_pkg::*;
  import crc_tb_pkg::*;

  int checks = 0, failures = 0;

  logic        clk = 0, rst = 1;
  logic        cfg_we = 0, cfg_start = 0;
  logic [2:0]  cfg_pe = 0;
  cfg_tgt_e    cfg_tgt = CFG_CTX;
  logic [3:0]  cfg_addr = 0;
  logic [64:0] cfg_wdata = 0;
  logic [31:0] north_din [3], south_din [3], west_din [2], east_din [2];
  logic [31:0] north_dout [3], south_dout [3], west_dout [2], east_dout [2];
  logic [2:0]  north_sin = 0, south_sin = 0, north_sout, south_sout;
  logic [1:0]  west_sin = 0, east_sin = 0, west_sout, east_sout;
  logic        running;
  logic [3:0]  pe_state [6];
  logic [3:0]  pe_ctx [6];
  logic [5:0]  pe_taken;

  crc_array dut (
    .clk, .rst, .cfg_we, .cfg_pe, .cfg_tgt, .cfg_addr, .cfg_wdata, .cfg_start,
    .north_din, .north_sin, .north_dout, .north_sout,
    .south_din, .south_sin, .south_dout, .south_sout,
    .west_din, .west_sin, .west_dout, .west_sout,
    .east_din, .east_sin, .east_dout, .east_sout,
    .running, .pe_state, .pe_ctx, .pe_taken);

  always #5 clk = ~clk;

  // mechanism counters
  int n_cfg = 0, n_ctx_switch = 0, n_chain = 0, n_pass = 0;
  int n_taken = 0, n_not_taken = 0, n_lockstep = 0, n_mul = 0;

  logic [3:0] prev_ctx [6];
  always @(posedge clk) begin
    if (cfg_we) n_cfg++;
    for (int i = 0; i < 6; i++) begin
      if (running && pe_ctx[i] != prev_ctx[i]) n_ctx_switch++;
      prev_ctx[i] <= pe_ctx[i];
    end
  end

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

  task automatic program_array();
    ctx_f c [6][4];
    int   cond [6];
    for (int p = 0; p < 6; p++) for (int k = 0; k < 4; k++) c[p][k] = idle();
    // context 0: the chained computation
    c[0][0].op = OP_ADD; c[0][0].a = IN_N; c[0][0].b = IN_W; c[0][0].dout[SIDE_E] = O_FU;
    c[1][0].op = OP_NOT; c[1][0].a = IN_W; c[1][0].dout[SIDE_S] = O_FU;
    c[3][0].op = OP_ADD; c[3][0].a = IN_W; c[3][0].b = IN_S; c[3][0].dout[SIDE_E] = O_FU;
    c[4][0].op = OP_ADD; c[4][0].a = IN_W; c[4][0].b = IN_N; c[4][0].dout[SIDE_E] = O_FU;
    c[5][0].op = OP_NOT; c[5][0].a = IN_W; c[5][0].dout[SIDE_E] = O_FU;
    c[5][0].dwe = 1; c[5][0].ddst = 0;
    c[2][0].op = OP_MUL; c[2][0].a = IN_N; c[2][0].b = IN_E; c[2][0].dout[SIDE_N] = O_FU;
    c[2][0].dwe = 1; c[2][0].ddst = 0;
    // context 1: loop body
    c[5][1].op = OP_ADD; c[5][1].a = REG(0); c[5][1].b = REG(1);
    c[5][1].dwe = 1; c[5][1].ddst = 1; c[5][1].dout[SIDE_E] = O_FU;
    c[2][1].op = OP_ADD; c[2][1].a = REG(1); c[2][1].b = IN_E;
    c[2][1].dwe = 1; c[2][1].ddst = 1;
    // context 2: loop test in PE2, status routed to all PEs
    c[2][2].op = OP_LT; c[2][2].a = REG(1); c[2][2].b = IN_N;
    c[2][2].swe = 1; c[2][2].sdst = 0;
    c[2][2].sout[SIDE_W] = O_FU; c[2][2].sout[SIDE_S] = O_FU;
    c[1][2].sout[SIDE_W] = PASS_E;
    c[5][2].sout[SIDE_W] = PASS_N;
    c[4][2].sout[SIDE_W] = PASS_E;
    // context 3: results on the border
    c[5][3].dout[SIDE_E] = 1;       // accumulator r1
    c[2][3].dout[SIDE_N] = 0;       // product r0
    cond[0] = C_E; cond[1] = C_E; cond[2] = C_FU;
    cond[3] = C_E; cond[4] = C_E; cond[5] = C_N;
    for (int p = 0; p < 6; p++) begin
      for (int k = 0; k < 4; k++) cfg_write(p, CFG_CTX, k, pack_ctx(c[p][k]));
      cfg_write(p, CFG_FSM, 0, 65'(pack_fsm(0, cond[p], 1, 1)));
      cfg_write(p, CFG_FSM, 1, 65'(pack_fsm(1, cond[p], 2, 2)));
      cfg_write(p, CFG_FSM, 2, 65'(pack_fsm(2, cond[p], 1, 3)));
      cfg_write(p, CFG_FSM, 3, 65'(pack_fsm(3, cond[p], 3, 3)));
    end
  endtask

  task automatic check_lockstep();
    checks++;
    for (int i = 1; i < 6; i++) begin
      if (pe_state[i] !== pe_state[0]) begin
        failures++;
        $display("FAIL PE%0d in state %0d, PE0 in %0d", i, pe_state[i], pe_state[0]);
        return;
      end
    end
    n_lockstep++;
  endtask

  initial begin
    for (int i = 0; i < 3; i++) begin north_din[i] = 0; south_din[i] = 0; end
    for (int i = 0; i < 2; i++) begin west_din[i] = 0; east_din[i] = 0; end
    for (int i = 0; i < 6; i++) prev_ctx[i] = 0;
    repeat (2) @(posedge clk);
    for (int round = 0; round < 6; round++) begin
      logic [31:0] b, cc, e, f, g, h, a, d;
      int          k, cyc;
      e = $urandom; f = $urandom; g = $urandom; h = $urandom;
      b  = 32'($urandom_range(1, 40));
      cc = 32'($urandom_range(1, 9));
      if (round == 0) cc = b;      // a single iteration
      a = mul16(b, cc);
      d = (e - f) + (g - h);
      k = int'((b + cc - 1) / cc);
      north_din[0] = e; west_din[0] = g; west_din[1] = f; south_din[0] = h;
      north_din[2] = b; east_din[0] = cc;
      rst = 1;
      @(negedge clk);
      rst = 0;
      program_array();
      checks++;
      if (running) begin failures++; $display("FAIL running before start"); end
      cfg_start = 1;
      @(negedge clk);
      cfg_start = 0;
      // state 0: whole expression within one cycle
      #1;
      expect32("state", 32'(pe_state[0]), 0);
      expect32("chained d on east border", east_dout[1], d);
      expect32("product a on north border", north_dout[2], a);
      if (east_dout[1] === d) n_chain++;
      if (north_dout[2] === a) n_mul++;
      check_lockstep();
      @(negedge clk);
      cyc = 1;
      while (pe_state[0] != 3 && cyc < 200) begin
        #1;
        check_lockstep();
        if (pe_state[0] == 2) begin
          n_pass++;
          if (pe_taken == 6'b111111) n_taken++;
          else if (pe_taken == 6'b000000) n_not_taken++;
          else begin failures++; $display("FAIL PEs disagree on the branch: %b", pe_taken); end
          checks++;
        end
        @(negedge clk);
        cyc++;
      end
      #1;
      check_lockstep();
      expect32("cycles to finish", 32'(cyc), 32'(1 + 2 * k));
      expect32("accumulated k*d", east_dout[1], 32'(k) * d);
      expect32("product kept", north_dout[2], a);
      @(negedge clk);
    end
    // every mechanism must have happened
    checks += 8;
    if (n_cfg == 0)        begin failures++; $display("FAIL no configuration write"); end
    if (n_ctx_switch == 0) begin failures++; $display("FAIL no context switch"); end
    if (n_chain == 0)      begin failures++; $display("FAIL no chained cycle"); end
    if (n_mul == 0)        begin failures++; $display("FAIL no product"); end
    if (n_pass == 0)       begin failures++; $display("FAIL no pass-through cycle"); end
    if (n_taken == 0)      begin failures++; $display("FAIL no taken branch"); end
    if (n_not_taken == 0)  begin failures++; $display("FAIL no not-taken branch"); end
    if (n_lockstep == 0)   begin failures++; $display("FAIL no lockstep check"); end
    $display("mechanisms: cfg_writes=%0d ctx_switches=%0d chained=%0d mul=%0d pass=%0d taken=%0d not_taken=%0d lockstep=%0d",
             n_cfg, n_ctx_switch, n_chain, n_mul, n_pass, n_taken, n_not_taken, n_lockstep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
