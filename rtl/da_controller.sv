// da_controller - sequencing of the bit-serial distributed-arithmetic engine.
//
// A transform takes W bit-cycles, m = 0 .. W-1.  `start` is accepted when the
// engine is idle or in its last bit-cycle (`ready`), so transforms can follow
// each other with no gap: one result vector every W cycles.  Outputs:
//   load  - capture the input words into the parallel-to-serial converters
//   busy  - a bit-cycle is in progress (enables the shift-accumulators)
//   s1    - 1 on the sign-bit cycle m = W-1 (OBC inversion of the ROM output)
//   s2    - 1 on the first bit-cycle m = 0 (accumulators take D_extra)
//   done  - 1 for one cycle after the last bit-cycle: results are valid
// The meaning of S1 and S2 follows the engine description; the exact cycle at
// which each is raised, the start/ready handshake and the synchronous
// active-low reset are this design's choices.
module da_controller #(
  parameter  int W  = 8,
  localparam int MW = (W > 1) ? $clog2(W) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          ready,
  output logic          load,
  output logic          busy,
  output logic          s1,
  output logic          s2,
  output logic          done,
  output logic [MW-1:0] m
);
  logic last;

  always_comb begin
    last  = busy && (m == MW'(W - 1));
    ready = !busy || last;
    load  = start && ready;
    s1    = last;
    s2    = busy && (m == '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      m    <= '0;
      done <= 1'b0;
    end else begin
      done <= last;
      if (load) begin
        busy <= 1'b1;
        m    <= '0;
      end else if (last) begin
        busy <= 1'b0;
        m    <= '0;
      end else if (busy) begin
        m <= m + 1'b1;
      end
    end
  end

  // A transform in progress always has a valid bit index.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> (int'(m) < W));
endmodule
