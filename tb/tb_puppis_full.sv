// Full-size test of the accelerator with every parameter at its default: the
// six prediction layers of a MobileNetV1 SSD (19x19x3, 10x10x6, 5x5x6, 3x3x6,
// 2x2x6 and 1x1x6 = 1917 boxes) and 21 classes (Pascal VOC with background),
// with random confidences and modifiers. Two frames: software start, then the
// CNN handshake. See tb_puppis_env for what is checked.
module tb_puppis_full;
  tb_puppis_env #(
    .NL(6), .NB('{1083, 600, 150, 54, 24, 6}), .NCLS(21), .FRAMES(2), .TOPK(100),
    .TVAL1(1638), .TVAL2(4915), .MAX_CYCLES(5_000_000), .SEED(7)
  ) u_env ();
endmodule
