// Test of puppis_control in its system: the Control state machine can only be
// exercised by the blocks it sequences, so this runs the full accelerator
// through tb_puppis_env with a configuration chosen for the sequencing rather
// than the datapath: three SSD layers of different sizes (so the per-layer
// loops for ECLUT load, confidences, box modifiers and anchors each turn
// over), 5 classes, K = 3 (fewer results written than found), two frames
// (software start, then the cnn_done / ssd_ack / ssd_done / cnn_ack
// handshake). The frame is too small for a read to cross a 4 KiB boundary,
// so burst splitting is not required here (the other two system tests cover
// it). The environment checks the phase sequence
// SOFTMAX -> BOXES -> NMS -> SORT once per frame, every score, box and
// detection word, the result count and the handshake levels.
module tb_puppis_control;
  tb_puppis_env #(
    .NL(3), .NB('{20, 15, 10, 0, 0, 0}), .NCLS(5), .FRAMES(2), .TOPK(3),
    .TVAL1(1638), .TVAL2(6554), .MAX_CYCLES(1_000_000), .SEED(3),
    .NEED_SPLIT(1'b0)
  ) u_env ();
endmodule
