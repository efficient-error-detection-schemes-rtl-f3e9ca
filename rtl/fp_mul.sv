// fp_mul: bit-serial modular multiplier, y = a * b mod p.
//
// Interleaved (Blakley) multiplication: the multiplier a is scanned from its
// most significant bit down, one bit per clock. Each step doubles the
// accumulator, adds b when the current bit of a is set, and brings the sum
// back below p with at most one subtraction of 2p or p (the sum is below 3p).
// Both operands must already be reduced (a, b < p).
//
// Interface: pulse `start` for one cycle with a and b valid; the operands are
// captured. `done` pulses for one cycle N clock edges after the edge that took `start`,
// with the product on `y` (held until the next start). `busy` is high in
// between. A start while busy is ignored.
//
// The published error-detection scheme leaves the field arithmetic open; this serial
// multiplier is this design's own choice, picked for small area.
module fp_mul
  import ecc_pkg::*;
#(
  parameter fe_t P_MOD = P256_P
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fe_t  a,
  input  fe_t  b,
  output logic busy,
  output logic done,
  output fe_t  y
);

  localparam int unsigned CW = $clog2(N + 1);

  fe_t           acc;
  fe_t           areg, breg;
  logic [CW-1:0] cnt;
  logic [N+1:0]  nxt;

  // one step of the interleaved multiplication
  always_comb begin
    logic [N+1:0] t;
    t = {1'b0, acc, 1'b0} + (areg[N-1] ? {2'b00, breg} : '0);
    if (t >= {1'b0, P_MOD, 1'b0})   nxt = t - {1'b0, P_MOD, 1'b0};
    else if (t >= {2'b00, P_MOD})   nxt = t - {2'b00, P_MOD};
    else                            nxt = t;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      areg <= '0;
      breg <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          areg <= a;
          breg <= b;
          acc  <= '0;
          cnt  <= CW'(N);
          busy <= 1'b1;
        end
      end else begin
        acc  <= nxt[N-1:0];   // nxt < p after the reduction
        areg <= {areg[N-2:0], 1'b0};
        cnt  <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign y = acc;

endmodule
