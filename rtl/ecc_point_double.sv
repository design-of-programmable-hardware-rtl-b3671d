// ecc_point_double: affine point doubling R = 2P on y^2 = x^3 + a*x + b
// over GF(p).
//
// Tangent rule: lambda = (3*x^2 + a) / (2*y), xr = lambda^2 - 2*x,
// yr = lambda * (x - xr) - y. One interleaved multiplier and one inverter
// run in sequence: x^2, the inversion of 2y, lambda, lambda^2 and the last
// product; additions mod p are combinational. P = O, or y = 0 (a point of
// order two), gives O at once.
//
// Interface: pulse `start` with P and the curve coefficient `a` valid
// (below p, p an odd prime below 2^WIDTH); `done` pulses with the result.
//
// The document designs point doubling as a module of its own; the affine
// coordinates and the schedule are this design's choices.
module ecc_point_double #(
  parameter int unsigned WIDTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] px, py,
  input  logic             p_inf,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] rx, ry,
  output logic             r_inf
);

  typedef enum logic [2:0] {S_IDLE, S_SQX, S_INV, S_LAM, S_SQR, S_YMUL} state_t;
  state_t state_q;

  logic [WIDTH-1:0] p_q, a_q, xp, yp, num, lam;
  logic             mul_start, mul_busy, mul_done, inv_start, inv_busy, inv_done;
  logic [WIDTH-1:0] mul_a, mul_b, mul_r, inv_a, inv_r, xr_next, num_next;

  function automatic logic [WIDTH-1:0] add_mod(logic [WIDTH-1:0] x, logic [WIDTH-1:0] y, logic [WIDTH-1:0] m);
    logic [WIDTH:0] s;
    s = {1'b0, x} + {1'b0, y};
    return (s >= {1'b0, m}) ? WIDTH'(s - {1'b0, m}) : WIDTH'(s);
  endfunction

  function automatic logic [WIDTH-1:0] sub_mod(logic [WIDTH-1:0] x, logic [WIDTH-1:0] y, logic [WIDTH-1:0] m);
    return (x >= y) ? x - y : x + (m - y);
  endfunction

  ecc_modmul #(.WIDTH(WIDTH)) u_mul (
    .clk, .rst_n, .start(mul_start), .a(mul_a), .b(mul_b), .p(p_q),
    .busy(mul_busy), .done(mul_done), .r(mul_r));

  ecc_modinv #(.WIDTH(WIDTH)) u_inv (
    .clk, .rst_n, .start(inv_start), .a(inv_a), .p(p_q),
    .busy(inv_busy), .done(inv_done), .r(inv_r));

  assign inv_a    = add_mod(yp, yp, p_q);
  assign num_next = add_mod(add_mod(add_mod(mul_r, mul_r, p_q), mul_r, p_q), a_q, p_q);
  assign xr_next  = sub_mod(sub_mod(mul_r, xp, p_q), xp, p_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      {p_q, a_q, xp, yp, num, lam, rx, ry} <= '0;
      r_inf <= 1'b0; done <= 1'b0;
      mul_start <= 1'b0; inv_start <= 1'b0; mul_a <= '0; mul_b <= '0;
    end else begin
      done      <= 1'b0;
      mul_start <= 1'b0;
      inv_start <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          if (p_inf || py == '0) begin
            rx <= '0; ry <= '0; r_inf <= 1'b1; done <= 1'b1;
          end else begin
            p_q <= p; a_q <= a; xp <= px; yp <= py;
            mul_a <= px; mul_b <= px; mul_start <= 1'b1;
            state_q <= S_SQX;
          end
        end
        S_SQX: if (mul_done) begin
          num <= num_next;
          inv_start <= 1'b1;
          state_q <= S_INV;
        end
        S_INV: if (inv_done) begin
          mul_a <= num; mul_b <= inv_r; mul_start <= 1'b1;
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

endmodule
