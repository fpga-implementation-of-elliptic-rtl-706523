// gf_mult: bit-serial shift-and-add GF(2^m) multiplier (MULT unit) with its
// NIST reduction.
//
// The multiplier DT2 is scanned one bit per cycle from its most significant
// bit down. Each cycle the 2m-1 bit accumulator is shifted left by one and
// the multiplicand DT1 is XORed in when the scanned bit is one. After m
// cycles the accumulator holds the full unreduced product, which goes
// through an instance of nist_reduce. To make a multiplication take exactly
// m cycles including write-back, the last shift-and-add step is not stored:
// its result is reduced combinationally and presented on m_out while done is
// high, and the register array captures it at that clock edge.
//
// Interface: hold en high with dt1 and dt2 stable for m consecutive cycles.
// done is high in the m-th cycle, in which m_out is valid. The counter then
// returns to zero, so a new multiplication may start in the next cycle.
// Reset clears the counter.
// The bit-serial shift-and-add method, its m-cycle latency and the
// reduction after the multiplier follow the original architecture; the
// MSB-first scan and the unstored last step are this implementation's
// choices.
module gf_mult #(
  parameter int M = ecc_pkg::M
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic [M-1:0] dt1,
  input  logic [M-1:0] dt2,
  output logic         done,
  output logic [M-1:0] m_out
);
  localparam int CW = $clog2(M);

  logic [CW-1:0]  cnt;
  logic [2*M-2:0] acc, acc_next;
  logic           bit_i;

  always_comb begin
    bit_i    = dt2[M-1-int'(cnt)];
    acc_next = ((cnt == '0) ? '0 : (acc << 1)) ^ (bit_i ? (2*M-1)'(dt1) : '0);
    done     = en && (cnt == CW'(M-1));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      acc <= '0;
    end else if (en) begin
      acc <= acc_next;
      cnt <= done ? '0 : cnt + 1'b1;
    end
  end

  nist_reduce #(.M(M)) u_red (.c(acc_next), .r(m_out));

  // Operands must not change while a multiplication is in progress.
  a_stable: assert property (@(posedge clk) disable iff (rst)
                             (en && cnt != '0) |-> ($stable(dt1) && $stable(dt2)));

endmodule
