// tb_repvgg_accel: end-to-end test of the accelerator on 8x8 feature maps
// (every parameter of the accelerator at its default). See
// repvgg_accel_tb_core for the sequence and the checks.
`timescale 1ns/1ps
module tb_repvgg_accel;
  logic finished;
  repvgg_accel_tb_core #(.H(8), .W(8)) core (.finished);
endmodule
