// qpp_interleaver_tb: runs the generator over whole blocks for several LTE
// block sizes (f1, f2 pairs of the LTE table) and checks every address
// against (f1*i + f2*i^2) mod N computed with 64-bit integers, plus that the
// sequence is a permutation of 0..N-1.
module qpp_interleaver_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, en;
  logic [12:0] n_len, f1, f2, addr, index;

  qpp_interleaver dut (.*);

  int checks = 0, failures = 0;

  task automatic run(int n, int a, int b);
    bit used [];
    used = new[n];
    @(negedge clk);
    n_len = 13'(n); f1 = 13'(a); f2 = 13'(b);
    start = 1; @(negedge clk); start = 0;
    for (int i = 0; i < n; i++) begin
      longint e;
      e = (longint'(a) * i + longint'(b) * i * i) % n;
      checks++;
      if (longint'(addr) != e || int'(index) != i) begin
        failures++; $display("N=%0d i=%0d addr %0d exp %0d", n, i, addr, e);
      end
      if (used[addr]) begin failures++; $display("N=%0d repeated %0d", n, addr); end
      used[addr] = 1;
      en = 1; @(negedge clk); en = 0;
    end
  endtask

  initial begin
    {start, en} = '0; {n_len, f1, f2} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(40, 3, 10);
    run(1008, 55, 84);
    run(6144, 263, 480);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
