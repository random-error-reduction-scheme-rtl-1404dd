// tb_sc_mux: exhaustive check of a 5-input multiplexer (all data patterns,
// all select values including the unused 5..7 which must give 0), and of
// the 2-input scaled adder z = s*x1 + (1-s)*x2 on an 8-bit worked example.
module tb_sc_mux;
  logic [4:0] d;
  logic [2:0] sel;
  logic z;
  logic [1:0] d2;
  logic s, z2;
  int checks = 0, failures = 0;

  sc_mux #(.N(5)) dut (.d(d), .sel(sel), .z(z));
  sc_mux #(.N(2)) dut2 (.d(d2), .sel(s), .z(z2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static logic [7:0] x1p = 8'b1010_1010, x2p = 8'b1011_1101, sp = 8'b0101_0110, zp;
    for (int v = 0; v < 32; v++)
      for (int k = 0; k < 8; k++) begin
        d = 5'(v); sel = 3'(k);
        #1 checks++;
        if (z !== (k < 5 ? d[k] : 1'b0)) failures++;
      end
    for (int i = 7; i >= 0; i--) begin
      d2 = {x1p[i], x2p[i]}; s = sp[i];
      #1 checks++;
      if (z2 !== (sp[i] ? x1p[i] : x2p[i])) failures++;
      zp[i] = z2;
    end
    // the worked example: X1 = 10101010, X2 = 10111101, S = 01010110
    // (first bit on the left) gives Z = 10101011
    checks++;
    if (zp !== 8'b1010_1011) begin failures++; $display("scaled adder gave %b", zp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
