// tb_repvgg_accel_full: end-to-end test of the accelerator on 32x32 feature
// maps, the size of the first RepVGG-like stage on CIFAR-10 (16 channels at
// 32x32), with every parameter of the accelerator at its default. See
// repvgg_accel_tb_core for the sequence and the checks.
`timescale 1ns/1ps
module tb_repvgg_accel_full;
  logic finished;
  repvgg_accel_tb_core #(.H(32), .W(32)) core (.finished);
endmodule
