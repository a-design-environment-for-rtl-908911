// tb_crc_regset -- self-checking test of the data/status register set.
//
// Random writes (including the unused indices 12..15, which must be ignored)
// against a model array kept here; every register is compared after every
// clock edge. Also checks that reset clears all registers and that a write
// becomes visible one cycle after it is presented.
module tb_crc_regset;
  int checks = 0, failures = 0;

  logic        clk = 0, rst = 1;
  logic        d_we, s_we, s_wdata;
  logic [3:0]  d_waddr, s_waddr;
  logic [31:0] d_wdata;
  logic [31:0] dreg [12];
  logic [11:0] sreg;

  logic [31:0] mdreg [12];
  logic [11:0] msreg;

  crc_regset dut (.clk, .rst, .d_we, .d_waddr, .d_wdata, .s_we, .s_waddr, .s_wdata,
                  .dreg, .sreg);

  always #5 clk = ~clk;

  task automatic compare(string what);
    for (int i = 0; i < 12; i++) begin
      checks++;
      if (dreg[i] !== mdreg[i]) begin
        failures++;
        $display("FAIL %s dreg[%0d]=%h exp %h", what, i, dreg[i], mdreg[i]);
      end
    end
    checks++;
    if (sreg !== msreg) begin
      failures++;
      $display("FAIL %s sreg=%b exp %b", what, sreg, msreg);
    end
  endtask

  initial begin
    d_we = 0; s_we = 0; d_waddr = 0; s_waddr = 0; d_wdata = 0; s_wdata = 0;
    for (int i = 0; i < 12; i++) mdreg[i] = 0;
    msreg = 0;
    repeat (2) @(posedge clk);
    #1 compare("reset");
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      d_we    = 1'($urandom);
      d_waddr = 4'($urandom);
      d_wdata = $urandom;
      s_we    = 1'($urandom);
      s_waddr = 4'($urandom);
      s_wdata = 1'($urandom);
      @(posedge clk);
      if (d_we && d_waddr < 12) mdreg[d_waddr] = d_wdata;
      if (s_we && s_waddr < 12) msreg[s_waddr] = s_wdata;
      #1 compare("run");
    end
    rst = 1;
    @(posedge clk);
    for (int i = 0; i < 12; i++) mdreg[i] = 0;
    msreg = 0;
    #1 compare("second reset");
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
