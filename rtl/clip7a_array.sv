// clip7a_array: the CLIP7A linear array of N processing elements.
//
// Every element receives the same microinstruction in the same clock
// (SIMD), and departs from it only through its local activity, function,
// connectivity and addressing. Neighbours exchange propagation bits in both
// directions; the ends read 0. The processor D chain enters at the right end
// (element N-1) and leaves at the left end (element 0); the co-processor D
// chain enters at the left and leaves at the right. Both chain inputs come
// from pdata_in / cdata_in. 256 elements, enough for one line of a 256 x 256
// image, is the design's size; the end values are this design's choice.
module clip7a_array
  import clip7_pkg::*;
#(
  parameter int unsigned N_PE      = 256,
  parameter int unsigned RAM_WORDS = 4096
) (
  input  logic         clk,
  input  logic         rst,
  input  array_ctrl_t  ctrl,
  input  logic [W-1:0] pdata_in,    // into element N-1
  output logic [W-1:0] pdata_out,   // from element 0
  input  logic [W-1:0] cdata_in,    // into element 0
  output logic [W-1:0] cdata_out,   // from element N-1
  output logic [N_PE-1:0] prop      // every element's propagation output
);
  // pchain[i] is the processor D word leaving element i (moving left);
  // cchain[i] the co-processor D word leaving element i (moving right).
  logic [W-1:0] pchain [N_PE];
  logic [W-1:0] cchain [N_PE];

  for (genvar i = 0; i < int'(N_PE); i++) begin : g_pe
    logic          pl, pr;
    logic [W-1:0]  pin, cin;
    if (i == 0) begin : g_l
      assign pl  = 1'b0;
      assign cin = cdata_in;
    end else begin : g_l
      assign pl  = prop[i-1];
      assign cin = cchain[i-1];
    end
    if (i == int'(N_PE) - 1) begin : g_r
      assign pr  = 1'b0;
      assign pin = pdata_in;
    end else begin : g_r
      assign pr  = prop[i+1];
      assign pin = pchain[i+1];
    end
    clip7a_pe #(.RAM_WORDS(RAM_WORDS)) u_pe (
      .clk, .rst, .ctrl,
      .prop_l(pl), .prop_r(pr), .prop_out(prop[i]),
      .pdata_in_r(pin), .pdata_out_l(pchain[i]),
      .cdata_in_l(cin), .cdata_out_r(cchain[i])
    );
  end

  assign pdata_out = pchain[0];
  assign cdata_out = cchain[N_PE-1];
endmodule
