// End-to-end test of the accelerator at a small size: two SSD layers of 60
// and 70 boxes, 4 classes, two frames (software start, then the CNN
// handshake). See tb_puppis_env for what is checked.
module tb_puppis_top;
  tb_puppis_env #(
    .NL(2), .NB('{60, 70, 0, 0, 0, 0}), .NCLS(4), .FRAMES(2), .TOPK(10),
    .TVAL1(1638), .TVAL2(11469), .MAX_CYCLES(2_000_000), .SEED(1)
  ) u_env ();
endmodule
