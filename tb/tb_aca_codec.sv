// End-to-end testbench of aca_codec at its default parameters on a small
// synthetic image (64 x 48 pixels, then 40000 white pixels and 2048 coin
// flips): encode, decode concurrently, compare. See aca_codec_harness.
module tb_aca_codec;
  aca_codec_harness #(.W(64), .H(48), .BLANK(40000), .NOISE(2048)) h ();

  initial begin
    #200000000;
    h.failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", h.checks, h.failures);
    $finish;
  end
endmodule
