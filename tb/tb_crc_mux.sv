// tb_crc_mux -- self-checking test of the context-controlled multiplexer.
//
// A 16-input instance is driven with random inputs and every select value;
// a 14-input instance with a 4-bit select also checks that the unused codes
// 14 and 15 give zero.
module tb_crc_mux;
  int checks = 0, failures = 0;

  logic [31:0] in16 [16];
  logic [31:0] in14 [14];
  logic [3:0]  sel;
  logic [31:0] out16, out14;

  crc_mux #(.N(16), .WIDTH(32))            dut16 (.in(in16), .sel, .out(out16));
  crc_mux #(.N(14), .WIDTH(32), .SEL_W(4)) dut14 (.in(in14), .sel, .out(out14));

  initial begin
    for (int round = 0; round < 200; round++) begin
      for (int i = 0; i < 16; i++) in16[i] = $urandom;
      for (int i = 0; i < 14; i++) in14[i] = $urandom;
      for (int s = 0; s < 16; s++) begin
        sel = 4'(s);
        #1;
        checks += 2;
        if (out16 !== in16[s]) begin
          failures++;
          $display("FAIL N16 sel=%0d got %h exp %h", s, out16, in16[s]);
        end
        if (out14 !== ((s < 14) ? in14[s] : 32'd0)) begin
          failures++;
          $display("FAIL N14 sel=%0d got %h", s, out14);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
