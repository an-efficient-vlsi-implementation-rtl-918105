// mmm: radix-2 Montgomery modular multiplier with a precomputed B+M.
//
// Computes P = A*B*2^-K mod M for an odd modulus M < 2^K, with B < M and
// any K-bit A. The classic bit-serial recurrence is, for i = 0..K-1,
//   q_i = z_0 xor (a_i and b_0)
//   Z   = (Z + a_i*B + q_i*M) / 2
// Each iteration adds one of four values chosen by the two bits (a_i, q_i):
// 0, M, B, or the sum B+M. That sum is formed once when the operands are
// loaded, so the loop holds a single (K+2)-bit adder, a 4-way multiplexer
// and a one-bit shift, and no multiplier or subtractor. The final
// subtraction is left out: Z stays below 2M, and P is the (K+1)-bit value
// Z, congruent to A*B*2^-K mod M; a further multiplication accepts it as an
// operand B only if the caller reduces it below M first.
//
// This follows the structure the source design draws: operand registers, a
// precompute adder for B+M, the multiplexer selecting 0/B/M/B+M, one adder,
// a register Y of K+2 bits (k+1..0), the >>1 shift and an output register
// W/P of K+1 bits (k..0). Registered inputs, the start/done handshake and
// the clocking below are this design's choices.
//
// Timing: start is accepted when busy is low; A, B and M are sampled and B+M
// is registered on that clock. K iteration clocks follow; if start is high
// in clock cycle 0, done is high for one cycle in cycle K+1, and p holds
// the result from then until the next start.
module mmm #(
  parameter int unsigned K = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  input  logic [K-1:0] m,
  output logic         busy,
  output logic         done,
  output logic [K:0]   p
);
  typedef enum logic [1:0] {SEL_ZERO, SEL_M, SEL_B, SEL_BM} sel_t;

  logic         load, step, a_bit;
  logic [K-1:0] b_q, m_q;
  logic [K:0]   bm_q;       // precomputed B+M
  logic [K:0]   z_q;        // running Z, also the result register
  logic         q_bit;
  sel_t         sel;
  logic [K+1:0] addend, y;  // y = Z + addend, bits k+1..0

  mmm_ctrl #(.K(K)) u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .a     (a),
    .load  (load),
    .step  (step),
    .a_bit (a_bit),
    .last  (),
    .busy  (busy),
    .done  (done)
  );

  always_comb begin
    q_bit = z_q[0] ^ (a_bit & b_q[0]);
    sel   = sel_t'({a_bit, q_bit});
    unique case (sel)
      SEL_ZERO: addend = '0;
      SEL_M:    addend = (K+2)'(m_q);
      SEL_B:    addend = (K+2)'(b_q);
      SEL_BM:   addend = (K+2)'(bm_q);
    endcase
    y = (K+2)'(z_q) + addend;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_q  <= '0;
      m_q  <= '0;
      bm_q <= '0;
      z_q  <= '0;
    end else if (load) begin
      b_q  <= b;
      m_q  <= m;
      bm_q <= (K+1)'(b) + (K+1)'(m);
      z_q  <= '0;
    end else if (step) begin
      z_q  <= y[K+1:1];
    end
  end

  assign p = z_q;

  // The sum Z + addend is even by construction of q_i.
  a_even: assert property (@(posedge clk) disable iff (!rst_n) step |-> !y[0])
    else $error("mmm: odd partial sum, modulus must be odd");
endmodule
