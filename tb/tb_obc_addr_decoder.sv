// tb_obc_addr_decoder - exhaustive check for N = 4 and N = 3: address bit
// N-1-k must be x_k XOR x_0 and the negate flag x_0 XOR S1.
module tb_obc_addr_decoder;
  logic [3:0] xb4;
  logic [2:0] a4;
  logic       n4;
  logic [2:0] xb3;
  logic [1:0] a3;
  logic       n3;
  logic       s1;
  int checks = 0, failures = 0;

  obc_addr_decoder #(.N(4)) dut4 (.xbits(xb4), .s1, .addr(a4), .neg(n4));
  obc_addr_decoder #(.N(3)) dut3 (.xbits(xb3), .s1, .addr(a3), .neg(n3));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      xb4 = 4'(v);
      xb3 = 3'(v);
      s1  = v[4];
      #1;
      checks += 2;
      if (a4 !== {xb4[1] ^ xb4[0], xb4[2] ^ xb4[0], xb4[3] ^ xb4[0]} || n4 !== (xb4[0] ^ s1)) begin
        failures++;
        $display("N=4 x=%b s1=%b: addr=%b neg=%b", xb4, s1, a4, n4);
      end
      if (a3 !== {xb3[1] ^ xb3[0], xb3[2] ^ xb3[0]} || n3 !== (xb3[0] ^ s1)) begin
        failures++;
        $display("N=3 x=%b s1=%b: addr=%b neg=%b", xb3, s1, a3, n3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
