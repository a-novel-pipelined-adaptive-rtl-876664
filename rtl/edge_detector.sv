// edge_detector: pipelined edge detector producing DH, DV and TD.
//
// Eight CFA samples around the centre P(i,j) come in as p[0..7]:
//   p[0]=P(i-1,j+1) p[1]=P(i-1,j-1) p[2]=P(i,j+1)   p[3]=P(i,j-1)
//   p[4]=P(i+1,j-1) p[5]=P(i+1,j+1) p[6]=P(i-1,j)   p[7]=P(i+1,j)
// Six absolute subtractors and five adders compute
//   DH = |p0-p1| + |p2-p3| + |p4-p5|                  (horizontal differences)
//   DV = |p1-p4| + |p0-p5| + |p6-p7|                  (vertical differences)
//   TD = DH + DV                                       (edge strength)
// TD measures how strong an edge is; DH and DV give its direction.
//
// The datapath is cut into four register stages so that each stage holds a
// single subtract or add level:
//   stage 1: W1..W6, the six absolute differences
//   stage 2: W7 = W1+W2 and W8 = W5+W6 (W3, W4 carried along)
//   stage 3: DH = W7+W3 and DV = W8+W4
//   stage 4: TD = DH+DV (DH, DV carried along)
// All stages advance together when `en` is high, so the outputs belong to
// the inputs presented four enabled cycles earlier. The W1..W8
// names, the operand pairs and the four-stage depth follow the source; the
// exact placement of the pipeline registers is this design's choice.
module edge_detector
  import demosaic_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  pix_t                  p [8],
  output logic [DIR_W-1:0]      dh,
  output logic [DIR_W-1:0]      dv,
  output logic [TD_W-1:0]       td
);
  function automatic pix_t absdiff(input pix_t a, input pix_t b);
    return (a > b) ? a - b : b - a;
  endfunction

  pix_t             w1, w2, w3, w4, w5, w6;   // stage 1
  logic [PIX_W:0]   w7, w8;                   // stage 2
  pix_t             w3_s2, w4_s2;
  logic [DIR_W-1:0] dh_s3, dv_s3;             // stage 3

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {w1, w2, w3, w4, w5, w6} <= '0;
      {w7, w8, w3_s2, w4_s2}   <= '0;
      {dh_s3, dv_s3}           <= '0;
      {dh, dv, td}             <= '0;
    end else if (en) begin
      // stage 1: absolute subtractors
      w1 <= absdiff(p[0], p[1]);
      w2 <= absdiff(p[2], p[3]);
      w3 <= absdiff(p[4], p[5]);
      w4 <= absdiff(p[1], p[4]);
      w5 <= absdiff(p[0], p[5]);
      w6 <= absdiff(p[6], p[7]);
      // stage 2: first adder level
      w7    <= {1'b0, w1} + {1'b0, w2};
      w8    <= {1'b0, w5} + {1'b0, w6};
      w3_s2 <= w3;
      w4_s2 <= w4;
      // stage 3: direction sums
      dh_s3 <= DIR_W'(w7) + DIR_W'(w3_s2);
      dv_s3 <= DIR_W'(w8) + DIR_W'(w4_s2);
      // stage 4: total difference
      td <= TD_W'(dh_s3) + TD_W'(dv_s3);
      dh <= dh_s3;
      dv <= dv_s3;
    end
  end
endmodule
