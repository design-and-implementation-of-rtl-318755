// turbo_decoder_npe_tb: the decoder built with 2 PEs (1200-couple block) and
// with 8 PEs (2400-couple block, 300 couples per PE), each decoding a noisy
// block with 2 iterations and checked exactly against the reference turbo
// decoder, including the decode time, which shrinks with the PE count.
module turbo_decoder_npe_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int c2, f2, e2, c8, f8, e8;
  logic d2, d8;
  int checks, failures;

  turbo_decoder_check #(.NPE(2), .K_MAX(600), .N(1200), .P0(31), .P1(8), .P2(4), .P3(16))
    u_npe2 (.clk, .rst_n, .checks(c2), .failures(f2), .bit_errors(e2), .finished(d2));
  turbo_decoder_check #(.NPE(8), .K_MAX(300), .N(2400), .P0(53), .P1(62), .P2(12), .P3(2))
    u_npe8 (.clk, .rst_n, .checks(c8), .failures(f8), .bit_errors(e8), .finished(d8));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (d2 && d8);
    checks = c2 + c8 + 1;
    failures = f2 + f8;
    if (e2 + e8 > 40) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c8, f2 + f8 + 1);
    $finish;
  end
endmodule
