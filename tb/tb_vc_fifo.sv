// tb_vc_fifo: random push/pop on a 2-flit buffer checked against a queue.
module tb_vc_fifo;
  localparam int W = 34, D = 2;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0;

  vc_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == D)) begin
        failures++; $display("t=%0d flags empty=%b full=%b size=%0d", t, empty, full, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (dout != q[0]) begin failures++; $display("t=%0d dout=%h exp=%h", t, dout, q[0]); end
      end
      pop  = (q.size() > 0) && ($urandom % 2 == 0);
      push = ((q.size() < D) || pop) && ($urandom % 3 != 0);
      din  = {$urandom, 2'($urandom)};
      @(posedge clk);
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
