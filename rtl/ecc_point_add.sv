// ecc_point_add: affine point addition R = P + Q on y^2 = x^3 + a*x + b
// over GF(p).
//
// Chord rule: lambda = (yq - yp) / (xq - xp), xr = lambda^2 - xp - xq,
// yr = lambda * (xp - xr) - yp. The unit owns one interleaved multiplier
// and one inverter and runs them in sequence: one inversion and three
// multiplications; additions and subtractions mod p are combinational.
// The point at infinity is flagged by *_inf. P = O gives Q, Q = O gives P,
// and P = -Q gives O, each at once.
//
// Interface: pulse `start` with both points valid and P != Q (a doubling
// must go to ecc_point_double; an assertion checks this). `done` pulses
// with the result. Coordinates are below p, p an odd prime below 2^WIDTH.
//
// The document designs point addition as a module of its own; the affine
// coordinates and the operation schedule are this design's choices.
module ecc_point_add #(
  parameter int unsigned WIDTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] px, py,
  input  logic             p_inf,
  input  logic [WIDTH-1:0] qx, qy,
  input  logic             q_inf,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] rx, ry,
  output logic             r_inf
);

  typedef enum logic [2:0] {S_IDLE, S_INV, S_LAM, S_SQR, S_YMUL} state_t;
  state_t state_q;

  logic [WIDTH-1:0] p_q, xp, yp, xq, yq, lam;
  logic             mul_start, mul_busy, mul_done, inv_start, inv_busy, inv_done;
  logic [WIDTH-1:0] mul_a, mul_b, mul_r, inv_a, inv_r;

  function automatic logic [WIDTH-1:0] sub_mod(logic [WIDTH-1:0] x, logic [WIDTH-1:0] y, logic [WIDTH-1:0] m);
    return (x >= y) ? x - y : x + (m - y);
  endfunction

  ecc_modmul #(.WIDTH(WIDTH)) u_mul (
    .clk, .rst_n, .start(mul_start), .a(mul_a), .b(mul_b), .p(p_q),
    .busy(mul_busy), .done(mul_done), .r(mul_r));

  ecc_modinv #(.WIDTH(WIDTH)) u_inv (
    .clk, .rst_n, .start(inv_start), .a(inv_a), .p(p_q),
    .busy(inv_busy), .done(inv_done), .r(inv_r));

  logic [WIDTH-1:0] xr_next;
  assign xr_next = sub_mod(sub_mod(mul_r, xp, p_q), xq, p_q);   // valid in S_SQR when mul_done
  assign inv_a   = sub_mod(xq, xp, p_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      {p_q, xp, yp, xq, yq, lam, rx, ry} <= '0;
      r_inf <= 1'b0; done <= 1'b0;
      mul_start <= 1'b0; inv_start <= 1'b0; mul_a <= '0; mul_b <= '0;
    end else begin
      done      <= 1'b0;
      mul_start <= 1'b0;
      inv_start <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          if (p_inf) begin
            rx <= qx; ry <= qy; r_inf <= q_inf; done <= 1'b1;
          end else if (q_inf) begin
            rx <= px; ry <= py; r_inf <= 1'b0; done <= 1'b1;
          end else if (px == qx) begin
            // P = -Q (P = Q is excluded by the interface)
            rx <= '0; ry <= '0; r_inf <= 1'b1; done <= 1'b1;
          end else begin
            p_q <= p; xp <= px; yp <= py; xq <= qx; yq <= qy;
            inv_start <= 1'b1;
            state_q   <= S_INV;
          end
        end
        S_INV: if (inv_done) begin
          mul_a <= sub_mod(yq, yp, p_q); mul_b <= inv_r; mul_start <= 1'b1;
          state_q <= S_LAM;
        end
        S_LAM: if (mul_done) begin
          lam <= mul_r;
          mul_a <= mul_r; mul_b <= mul_r; mul_start <= 1'b1;
          state_q <= S_SQR;
        end
        S_SQR: if (mul_done) begin
          rx <= xr_next;
          mul_a <= lam; mul_b <= sub_mod(xp, xr_next, p_q); mul_start <= 1'b1;
          state_q <= S_YMUL;
        end
        S_YMUL: if (mul_done) begin
          ry <= sub_mod(mul_r, yp, p_q); r_inf <= 1'b0; done <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy = (state_q != S_IDLE);

  assert property (@(posedge clk) disable iff (!rst_n)
                   (start && !busy && !p_inf && !q_inf) |-> !(px == qx && py == qy));

endmodule
