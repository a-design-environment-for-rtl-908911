// tb_crc_ctxmem -- self-checking test of the context memory.
//
// Checks that reset clears every context word, that boot-time writes land at
// their address and nowhere else, and that the read port follows its address
// in the same cycle (asynchronous read), against a model kept here.
module tb_crc_ctxmem;
  int checks = 0, failures = 0;

  logic        clk = 0, rst = 1;
  logic        we;
  logic [3:0]  waddr, raddr;
  logic [64:0] wdata, rdata;
  logic [64:0] model [16];

  crc_ctxmem dut (.clk, .rst, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  task automatic read_all(string what);
    for (int i = 0; i < 16; i++) begin
      raddr = 4'(i);
      #1;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        $display("FAIL %s ctx[%0d]=%h exp %h", what, i, rdata, model[i]);
      end
    end
  endtask

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < 16; i++) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 read_all("reset");
    rst = 0;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we    = 1'($urandom);
      waddr = 4'($urandom);
      wdata = {1'($urandom), $urandom, $urandom};
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      we = 0;
      read_all("write");
    end
    rst = 1;
    @(posedge clk);
    for (int i = 0; i < 16; i++) model[i] = '0;
    #1 read_all("second reset");
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
