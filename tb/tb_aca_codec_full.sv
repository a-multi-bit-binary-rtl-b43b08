// Full-size testbench of aca_codec, with the top at its default parameters.
// One synthetic page the size of the standard fax test images, 1728 x 2376
// pixels (4,105,728 symbols), mostly white like a typed page, followed by a
// white margin of 40000 pixels, is encoded and decoded concurrently and the
// decoded symbols are compared one by one with the source. The page generator,
// the checks and the mechanism counters are in aca_codec_harness.
module tb_aca_codec_full;
  aca_codec_harness #(.W(1728), .H(2376), .BLANK(40000), .NOISE(0), .ACK_SLOW(64), .FLIP_AGREE(5)) h ();

  initial begin
    #2000000000;
    h.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end
endmodule
