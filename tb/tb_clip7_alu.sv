// tb_clip7_alu: self-checking test of the CLIP7 ALU.
// Drives random operands through every function, both under global control
// and with the function taken from the condition-register bits, and compares
// result and flags with a reference computed here.
module tb_clip7_alu;
  import clip7_pkg::*;
  logic [3:0]   op_g, cfn;
  logic         use_local, cin;
  logic [W-1:0] a, b, y;
  logic         z, c, n, v;
  int checks = 0, failures = 0;

  clip7_alu dut (.op_global(alu_op_e'(op_g)), .use_local, .cond_fn(cfn), .carry_in(cin),
                 .a, .b, .y, .flag_z(z), .flag_c(c), .flag_n(n), .flag_v(v));

  function automatic logic [W:0] ref_wide(input logic [3:0] op, input logic [W-1:0] x,
                                          input logic [W-1:0] w, input logic ci);
    case (op)
      4'd0:  return 0;
      4'd1:  return {1'b0, x};
      4'd2:  return {1'b0, w};
      4'd3:  return {1'b0, ~x};
      4'd4:  return {1'b0, x & w};
      4'd5:  return {1'b0, x | w};
      4'd6:  return {1'b0, x ^ w};
      4'd7:  return x + w;
      4'd8:  return {1'b0, x} + {1'b0, ~w} + 1;
      4'd9:  return {1'b0, w} + {1'b0, ~x} + 1;
      4'd10: return x + 1;
      4'd11: return {1'b0, x} + 17'h0ffff;
      4'd12: return {1'b0, x & ~w};
      4'd13: return x + w + ci;
      4'd14: return {1'b0, ~(x ^ w)};
      default: return {1'b0, 16'hffff};
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W:0] e;
    logic [3:0] eop;
    logic       ev;
    for (int i = 0; i < 2000; i++) begin
      op_g = 4'($urandom); cfn = 4'($urandom); use_local = 1'($urandom);
      cin = 1'($urandom);
      a = 16'($urandom); b = 16'($urandom);
      if (i % 7 == 0) b = a;       // exercise zero results
      if (i % 11 == 0) a = 16'h7fff;
      #1;
      eop = use_local ? cfn : op_g;
      e = ref_wide(eop, a, b, cin);
      ev = 1'b0;
      if (eop == 4'd7 || eop == 4'd13) ev = (a[15] == b[15]) && (e[15] != a[15]);
      if (eop == 4'd8) ev = (a[15] != b[15]) && (e[15] != a[15]);
      if (eop == 4'd9) ev = (a[15] != b[15]) && (e[15] != b[15]);
      checks++;
      if ({c, y} !== e || z !== (e[15:0] == 0) || n !== e[15] || v !== ev) begin
        failures++;
        if (failures < 10)
          $display("ALU mismatch op=%0d a=%h b=%h y=%h c=%b exp=%h", eop, a, b, y, c, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
