// tb_crc_fsm -- self-checking test of the configurable FSM.
//
// Loads random state tables (entry = {ctx[4], cond[5], next_t[4], next_f[4]}),
// then steps the FSM with random condition vectors and compares state,
// selected context and branch outcome every cycle with a model kept here.
// Also checks that the FSM holds state 0 while run is low and after reset.
module tb_crc_fsm;
  int checks = 0, failures = 0;

  logic        clk = 0, rst = 1, run = 0, we = 0;
  logic [3:0]  waddr = 0;
  logic [16:0] wdata = 0;
  logic [16:0] cond_in = 0;
  logic [3:0]  state, ctx;
  logic        taken;

  logic [16:0] tbl [16];
  logic [3:0]  mstate;
  int          n_taken = 0, n_not = 0;

  crc_fsm dut (.clk, .rst, .run, .we, .waddr, .wdata, .cond_in, .state, .ctx, .taken);

  always #5 clk = ~clk;

  function automatic logic [16:0] entry(int c, int cd, int nt, int nf);
    return {4'(c), 5'(cd), 4'(nt), 4'(nf)};
  endfunction

  task automatic compare(string what);
    logic [16:0] e;
    logic        t;
    e = tbl[mstate];
    t = cond_in[e[12:8]];
    checks += 3;
    if (state !== mstate) begin
      failures++; $display("FAIL %s state=%0d exp %0d", what, state, mstate);
    end
    if (ctx !== e[16:13]) begin
      failures++; $display("FAIL %s ctx=%0d exp %0d", what, ctx, e[16:13]);
    end
    if (taken !== t) begin
      failures++; $display("FAIL %s taken=%b exp %b", what, taken, t);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) tbl[i] = '0;
    mstate = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int round = 0; round < 20; round++) begin
      // load a table while not running
      run = 0;
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        tbl[i] = entry($urandom_range(0, 15), $urandom_range(0, 16),
                       $urandom_range(0, 15), $urandom_range(0, 15));
        we = 1; waddr = 4'(i); wdata = tbl[i];
      end
      @(negedge clk);
      we = 0;
      mstate = 0;
      cond_in = 17'($urandom);
      #1 compare("idle");
      @(posedge clk);   // run low: state must stay 0
      #1 compare("idle hold");
      @(negedge clk);
      run = 1;
      for (int n = 0; n < 100; n++) begin
        cond_in = 17'($urandom);
        #1 compare("run");
        if (taken) n_taken++; else n_not++;
        @(posedge clk);
        mstate = cond_in[tbl[mstate][12:8]] ? tbl[mstate][7:4] : tbl[mstate][3:0];
        @(negedge clk);
      end
      run = 0;
      @(posedge clk);
      mstate = 0;
      #1 compare("stop");
    end
    checks++;
    if (n_taken == 0 || n_not == 0) begin
      failures++; $display("FAIL branch outcomes not both seen");
    end
    rst = 1;
    @(posedge clk);
    #1;
    checks++;
    if (state !== 0 || ctx !== 0) begin
      failures++; $display("FAIL reset did not clear the FSM");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
