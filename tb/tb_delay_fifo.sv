// tb_delay_fifo: random data with random valid gaps must come out exactly
// DEPTH cycles later, valid bits included; reset clears the valid chain.
module tb_delay_fifo;
  localparam int W = 63, D = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [W-1:0] in_data = '0, out_data;
  logic [W-1:0] hist_d [$];
  logic         hist_v [$];

  delay_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    checks++;
    if (out_valid) failures++;
    rst_n = 1;
    for (int cyc = 0; cyc < 500; cyc++) begin
      @(negedge clk);
      in_valid = 1'($urandom_range(3, 0) != 0);
      in_data  = {$urandom(), $urandom()};
      hist_v.push_back(in_valid);
      hist_d.push_back(in_data);
      @(posedge clk); #1;
      if (hist_v.size() >= D) begin
        logic v; logic [W-1:0] d;
        v = hist_v.pop_front(); d = hist_d.pop_front();
        checks++;
        if (out_valid != v) failures++;
        if (v) begin
          checks++;
          if (out_data != d) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
