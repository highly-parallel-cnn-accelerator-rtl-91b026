// pingpong_buffer: one group of two static on-chip buffers used in a double-
// buffered way, each holding one CH_T-channel tile of a feature map.
//
// The producer writes bank `wr_bank`, the consumer reads the other one, so the
// Conv blocks can fill the next tile while BN&ReLU and the shortcut addition
// work on the previous one. `swap` exchanges the roles of the two banks. Writes
// take effect at the clock edge; reads have one cycle of latency (`rd_data` is
// valid the cycle after `rd_en`).
//
// Three groups of two static buffers, double-buffered, follow the accelerator
// description; the depth, port set and one-cycle read latency are this design's
// own.
module pingpong_buffer
  import repvgg_pkg::*;
#(
  parameter int DEPTH = 1024    // 32 x 32 pixels
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     swap,
  output logic                     wr_bank,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  vec_t                     wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output vec_t                     rd_data
);
  vec_t bank0 [DEPTH];
  vec_t bank1 [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    wr_bank <= 1'b0;
    else if (swap) wr_bank <= ~wr_bank;
  end

  always_ff @(posedge clk) begin
    if (wr_en && !wr_bank) bank0[wr_addr] <= wr_data;
    if (wr_en &&  wr_bank) bank1[wr_addr] <= wr_data;
    if (rd_en) rd_data <= wr_bank ? bank0[rd_addr] : bank1[rd_addr];
  end
endmodule
