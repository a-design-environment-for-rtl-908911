// tb_crc_bootcfg -- self-checking test of the boot configuration port.
//
// A port with PE_ID 4 of 6 sees random bus writes for all PEs and both
// targets. Strobes must appear only for its own number, only for the
// addressed target, with the data word cut to the target width, and only
// before cfg_start. The run flag must rise one cycle after cfg_start and
// fall with reset.
module tb_crc_bootcfg;
  import crc_pkg::*;
  int checks = 0, failures = 0;

  logic        clk = 0, rst = 1;
  logic        cfg_we = 0, cfg_start = 0;
  logic [2:0]  cfg_pe = 0;
  cfg_tgt_e    cfg_tgt = CFG_CTX;
  logic [3:0]  cfg_addr = 0;
  logic [64:0] cfg_wdata = 0;
  logic        ctx_we, fsm_we, running;
  logic [3:0]  ctx_waddr, fsm_waddr;
  logic [64:0] ctx_wdata;
  logic [16:0] fsm_wdata;

  crc_bootcfg #(.NUM_PE(6), .PE_ID(4)) dut (
    .clk, .rst, .cfg_we, .cfg_pe, .cfg_tgt, .cfg_addr, .cfg_wdata, .cfg_start,
    .ctx_we, .ctx_waddr, .ctx_wdata, .fsm_we, .fsm_waddr, .fsm_wdata, .running);

  always #5 clk = ~clk;

  task automatic check_strobes(logic run_exp);
    logic mine;
    mine = cfg_we && !run_exp && cfg_pe == 3'd4;
    checks += 3;
    if (ctx_we !== (mine && cfg_tgt == CFG_CTX)) begin
      failures++; $display("FAIL ctx_we=%b pe=%0d tgt=%0d run=%b", ctx_we, cfg_pe, cfg_tgt, run_exp);
    end
    if (fsm_we !== (mine && cfg_tgt == CFG_FSM)) begin
      failures++; $display("FAIL fsm_we=%b pe=%0d tgt=%0d run=%b", fsm_we, cfg_pe, cfg_tgt, run_exp);
    end
    if (running !== run_exp) begin
      failures++; $display("FAIL running=%b exp %b", running, run_exp);
    end
    if (ctx_we || fsm_we) begin
      checks += 4;
      if (ctx_waddr !== cfg_addr) begin failures++; $display("FAIL ctx_waddr"); end
      if (fsm_waddr !== cfg_addr) begin failures++; $display("FAIL fsm_waddr"); end
      if (ctx_wdata !== cfg_wdata) begin failures++; $display("FAIL ctx_wdata"); end
      if (fsm_wdata !== cfg_wdata[16:0]) begin failures++; $display("FAIL fsm_wdata"); end
    end
  endtask

  task automatic random_write();
    cfg_we    = 1'($urandom_range(0, 3) != 0);
    cfg_pe    = 3'($urandom_range(0, 5));
    if ($urandom_range(0, 2) == 0) cfg_pe = 3'd4;
    cfg_tgt   = cfg_tgt_e'($urandom_range(0, 1));
    cfg_addr  = 4'($urandom);
    cfg_wdata = {1'($urandom), $urandom, $urandom};
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check_strobes(1'b0);
    rst = 0;
    for (int round = 0; round < 3; round++) begin
      for (int n = 0; n < 300; n++) begin
        @(negedge clk);
        random_write();
        #1 check_strobes(1'b0);
      end
      @(negedge clk);
      cfg_we = 0;
      cfg_start = 1;
      #1 check_strobes(1'b0);
      @(negedge clk);
      cfg_start = 0;
      for (int n = 0; n < 100; n++) begin
        random_write();
        #1 check_strobes(1'b1);
        @(negedge clk);
      end
      rst = 1;
      @(negedge clk);
      rst = 0;
      cfg_we = 0;
      #1 check_strobes(1'b0);
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
