// tb_sc_stream_counter: feeds random 64-bit streams with random gaps in
// `en` and checks the ones count after each stream, including the
// all-ones stream that needs the full M+1 bits.
module tb_sc_stream_counter;
  localparam int unsigned M = 6;
  logic clk = 0, rst_n = 0, clear = 0, en = 0, z = 0;
  logic [M:0] ones;
  int checks = 0, failures = 0;

  sc_stream_counter #(.M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 50; s++) begin
      int expct, fed, p;
      expct = 0; fed = 0;
      p = (s == 0) ? 100 : int'($urandom % 101);
      @(negedge clk);
      clear = 1; en = 1; z = 1;  // clear wins over en
      @(negedge clk);
      clear = 0;
      checks++;
      if (ones != 0) failures++;
      while (fed < (1 << M)) begin
        en = ($urandom % 4) != 0;
        z  = int'($urandom % 100) < p;
        if (en) begin fed++; expct += z; end
        @(negedge clk);
      end
      en = 0; z = 1;
      repeat (2) @(negedge clk);
      checks++;
      if (int'(ones) != expct) begin
        failures++;
        $display("stream %0d: %0d ones, expected %0d", s, ones, expct);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
