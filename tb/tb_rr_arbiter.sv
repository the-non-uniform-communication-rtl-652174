// tb_rr_arbiter: random requests against a reference round-robin model.
// The reference keeps its own pointer and grants the first requester at or
// after it; the pointer moves past the grant whenever advance is high.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic [$clog2(N)-1:0] gnt_idx;
  logic advance;
  int checks = 0, failures = 0;
  int ref_ptr = 0;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .advance, .gnt, .gnt_idx);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_i;
    int served [N];
    req = '0; advance = 0;
    foreach (served[k]) served[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      req = (t < 1000) ? N'($urandom) : '1;
      advance = (t < 1000) ? ($urandom % 4 != 0) : 1'b1;
      #1;
      exp_i = -1;
      for (int k = 0; k < N; k++)
        if (exp_i < 0 && req[(ref_ptr + k) % N]) exp_i = (ref_ptr + k) % N;
      checks++;
      if (exp_i < 0) begin
        if (gnt != '0) begin failures++; $display("grant without request t=%0d", t); end
      end else if (gnt != N'(1) << exp_i || int'(gnt_idx) != exp_i) begin
        failures++;
        $display("t=%0d req=%b ptr=%0d gnt=%b expected %0d", t, req, ref_ptr, gnt, exp_i);
      end
      if (exp_i >= 0 && advance) begin
        ref_ptr = (exp_i + 1) % N;
        if (t >= 1000) served[exp_i]++;
      end
    end
    // fairness with all requesting: each served 1000/N times
    foreach (served[k]) begin
      checks++;
      if (served[k] != 1000 / N) begin failures++; $display("unfair: %0d served %0d", k, served[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
