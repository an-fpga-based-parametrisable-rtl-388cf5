// psc - parallel-to-serial converter feeding one input word X_k into the
// bit-serial distributed-arithmetic datapath.
//
// On `load` it captures the W-bit word; on every cycle with `shift` set it
// moves the word one place right, so `bit_out` presents bit 0 (the LSB) in
// the first cycle after the load, bit 1 in the next, and so on: the
// computation starts from the LSB, m = 0.  `load` wins over `shift`.  The
// converter itself is only named in the original engine design; a right-shift
// register is the simplest thing that does the job.
module psc #(
  parameter int W = 8
) (
  input  logic         clk,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] din,
  output logic         bit_out
);
  logic [W-1:0] sr;

  always_ff @(posedge clk) begin
    if (load)       sr <= din;
    else if (shift) sr <= {1'b0, sr[W-1:1]};
  end

  assign bit_out = sr[0];
endmodule
