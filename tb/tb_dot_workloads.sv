// tb_dot_workloads - runs the transform core on the configurations it is meant
// for: the 3-point example size and the 4-point, 8-bit evaluated size, with
// each of the three kernels (DCT, DHT, Hadamard), plus a wider 8-point, 16-bit
// DCT that exercises a two-level Wallace tree.  Both engines of every instance
// are checked against the reference model.
module tb_dot_workloads;
  import dot_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NR = 6;
  int   c [NR];
  int   f [NR];
  logic fin [NR];

  dot_top_runner #(.N(3), .W(8),  .TRANSFORM(DOT_DCT), .TCODE(0)) r0 (.clk, .checks(c[0]), .failures(f[0]), .finished(fin[0]));
  dot_top_runner #(.N(3), .W(8),  .TRANSFORM(DOT_DHT), .TCODE(1)) r1 (.clk, .checks(c[1]), .failures(f[1]), .finished(fin[1]));
  dot_top_runner #(.N(4), .W(8),  .TRANSFORM(DOT_DCT), .TCODE(0)) r2 (.clk, .checks(c[2]), .failures(f[2]), .finished(fin[2]));
  dot_top_runner #(.N(4), .W(8),  .TRANSFORM(DOT_DHT), .TCODE(1)) r3 (.clk, .checks(c[3]), .failures(f[3]), .finished(fin[3]));
  dot_top_runner #(.N(4), .W(8),  .TRANSFORM(DOT_FHT), .TCODE(2)) r4 (.clk, .checks(c[4]), .failures(f[4]), .finished(fin[4]));
  dot_top_runner #(.N(8), .W(16), .TRANSFORM(DOT_DCT), .TCODE(0)) r5 (.clk, .checks(c[5]), .failures(f[5]), .finished(fin[5]));

  int checks, failures;

  function automatic bit all_done();
    for (int j = 0; j < NR; j++) if (!fin[j]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    int waited;
    waited = 0;
    repeat (5) @(posedge clk);
    while (!all_done() && waited < 20000) begin
      @(posedge clk);
      waited++;
    end
    checks   = 0;
    failures = 0;
    for (int j = 0; j < NR; j++) begin
      checks   += c[j];
      failures += f[j];
      if (!fin[j] || c[j] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
