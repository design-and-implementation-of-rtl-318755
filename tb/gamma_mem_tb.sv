// gamma_mem_tb: writes random gamma vectors and tags circularly over the
// whole 5L depth and reads them back on the three ports at random
// addresses, comparing with a model array; also checks that a read of the
// address being written returns the old word in that cycle.
module gamma_mem_tb;
  import turbo_pkg::*;
  localparam int DEPTH = 50;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [5:0] waddr;
  gamma_vec_t wgamma;
  logic [12:0] wtag;
  logic [5:0] raddr [3];
  gamma_vec_t rgamma [3];
  logic [12:0] rtag [3];
  gamma_mem dut (.*);
  int checks = 0, failures = 0;
  gamma_vec_t mg [DEPTH];
  logic [12:0] mt [DEPTH];

  function automatic gamma_vec_t rnd_vec();
    gamma_vec_t v;
    for (int i = 0; i < 16; i++) v[i] = gamma_t'($urandom);
    return v;
  endfunction

  initial begin
    we = 0; waddr = 0; wgamma = '0; wtag = '0;
    for (int p = 0; p < 3; p++) raddr[p] = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a); wgamma = rnd_vec(); wtag = 13'($urandom);
      mg[a] = wgamma; mt[a] = wtag;
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 600; n++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      we = 1; waddr = 6'(a); wgamma = rnd_vec(); wtag = 13'($urandom);
      for (int p = 0; p < 3; p++) raddr[p] = (p == 0) ? 6'(a) : 6'($urandom_range(0, DEPTH - 1));
      #1;
      for (int p = 0; p < 3; p++) begin
        checks++;
        if (rgamma[p] != mg[raddr[p]] || rtag[p] != mt[raddr[p]]) begin
          failures++; $display("port %0d addr %0d mismatch", p, raddr[p]);
        end
      end
      @(negedge clk);
      mg[a] = wgamma; mt[a] = wtag;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
