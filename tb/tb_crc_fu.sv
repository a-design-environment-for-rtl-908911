// tb_crc_fu -- self-checking test of the functional unit.
//
// Drives every operation with random operands on a 32-bit and an 8-bit
// instance and compares data and status results with a reference written
// here from the operation definitions (signed half-width product, modulo
// sum, signed compare, bitwise logic, status select).
module tb_crc_fu;
  import crc_pkg::*;

  int checks = 0, failures = 0;

  fu_op_e      op;
  logic [31:0] a32, b32, y32;
  logic [7:0]  a8, b8, y8;
  logic        s_in, s32, s8;

  crc_fu #(.WIDTH(32)) dut32 (.op, .a(a32), .b(b32), .s_in, .y(y32), .s_out(s32));
  crc_fu #(.WIDTH(8))  dut8  (.op, .a(a8),  .b(b8),  .s_in, .y(y8),  .s_out(s8));

  // Reference: returns {status, data} for a given width.
  function automatic logic [32:0] ref_fu(fu_op_e o, logic [31:0] a, logic [31:0] b,
                                         logic s, int w);
    logic [31:0] mask, y;
    logic        st;
    longint      pa, pb, prod;
    mask = (w == 32) ? 32'hFFFF_FFFF : ((32'd1 << w) - 1);
    a &= mask; b &= mask;
    y = 0; st = s;
    // sign-extend the low halves
    pa = longint'(a & ((32'd1 << (w/2)) - 1));
    pb = longint'(b & ((32'd1 << (w/2)) - 1));
    if (pa >= (64'sd1 <<< (w/2 - 1))) pa -= (64'sd1 <<< (w/2));
    if (pb >= (64'sd1 <<< (w/2 - 1))) pb -= (64'sd1 <<< (w/2));
    prod = pa * pb;
    case (o)
      OP_MUL: y = 32'(prod);
      OP_ADD: y = a + b;
      OP_EQ:  st = (a == b);
      OP_LT: begin
        longint sa, sb;
        sa = longint'(a); sb = longint'(b);
        if (sa >= (64'sd1 <<< (w-1))) sa -= (64'sd1 <<< w);
        if (sb >= (64'sd1 <<< (w-1))) sb -= (64'sd1 <<< w);
        st = (sa < sb);
      end
      OP_AND: begin y = a & b; st = s && (a != 0); end
      OP_OR:  begin y = a | b; st = s || (a != 0); end
      OP_NOT: begin y = ~a;    st = !s; end
      OP_SEL: y = s ? b : a;
      default: ;
    endcase
    return {st, y & mask};
  endfunction

  task automatic check_now();
    logic [32:0] e32, e8;
    e32 = ref_fu(op, a32, b32, s_in, 32);
    e8  = ref_fu(op, {24'd0, a8}, {24'd0, b8}, s_in, 8);
    checks += 2;
    if ({s32, y32} !== e32) begin
      failures++;
      $display("FAIL w32 op=%s a=%h b=%h s=%b got y=%h s=%b exp y=%h s=%b",
               op.name(), a32, b32, s_in, y32, s32, e32[31:0], e32[32]);
    end
    if ({s8, 24'd0, y8} !== {e8[32], 24'd0, e8[7:0]}) begin
      failures++;
      $display("FAIL w8 op=%s a=%h b=%h s=%b got y=%h s=%b exp y=%h s=%b",
               op.name(), a8, b8, s_in, y8, s8, e8[7:0], e8[32]);
    end
  endtask

  initial begin
    // corner cases: equal operands, negative operands, zero
    for (int o = 0; o < 8; o++) begin
      op = fu_op_e'(o);
      a32 = 32'hFFFF_FFFF; b32 = 32'h0000_0001; a8 = 8'hFF; b8 = 8'h01; s_in = 1'b0;
      #1 check_now();
      a32 = 32'h0000_8000; b32 = 32'h0000_8000; a8 = 8'h08; b8 = 8'h08; s_in = 1'b1;
      #1 check_now();
      a32 = 0; b32 = 0; a8 = 0; b8 = 0; s_in = 1'b1;
      #1 check_now();
    end
    for (int i = 0; i < 4000; i++) begin
      op   = fu_op_e'($urandom_range(0, 7));
      a32  = $urandom; b32 = $urandom;
      if ($urandom_range(0, 3) == 0) b32 = a32;
      a8   = 8'($urandom); b8 = 8'($urandom);
      if ($urandom_range(0, 3) == 0) b8 = a8;
      s_in = 1'($urandom);
      #1 check_now();
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
