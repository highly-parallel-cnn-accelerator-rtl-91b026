// shortcut_add: element-wise addition that joins the branches of a RepVGG basic
// block, CH_T channels per cycle.
//
// In the forward path it adds the outputs of the 3x3, 1x1 and identity branches
// (each after its BN&ReLU); in the backward path the same unit adds the error
// contributions of the branches. Each branch has an enable, so a block without
// an identity branch (stride 2 or a change of channel count) adds only two
// terms. The sum saturates to Q8.8. One register stage: `out_valid` follows
// `in_valid` by one cycle.
//
// The addition of the three branch results after they are processed follows
// the accelerator description; the enables, saturation and timing are this
// design's own.
module shortcut_add
  import repvgg_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic [2:0] br_en,      // {identity, 1x1, 3x3}
  input  vec_t       br3,
  input  vec_t       br1,
  input  vec_t       brid,
  output logic       out_valid,
  output vec_t       out_data
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        for (int c = 0; c < CH_T; c++)
          out_data[c] <= sat16((br_en[0] ? 48'(br3[c])  : 48'sd0)
                             + (br_en[1] ? 48'(br1[c])  : 48'sd0)
                             + (br_en[2] ? 48'(brid[c]) : 48'sd0));
    end
  end
endmodule
