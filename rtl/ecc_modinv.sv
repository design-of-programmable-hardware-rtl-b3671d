// ecc_modinv: modular inverse r = a^-1 mod p by the binary extended
// Euclidean algorithm.
//
// It keeps u, v (starting at a and p) and the coefficients x1, x2 (starting
// at 1 and 0) with the invariants x1*a = u and x2*a = v (mod p). Each cycle
// does one step: halve an even u (and x1, adding p first if x1 is odd),
// else halve an even v (and x2), else subtract the smaller of u and v from
// the larger and the matching coefficients modulo p. When u or v reaches 1
// the matching coefficient is the inverse. At most about 2*WIDTH steps.
//
// Interface: pulse `start` with 0 < a < p and p an odd prime below 2^WIDTH.
// `done` pulses with `r` valid; a = 0 has no inverse and gives r = 0 at
// once. `busy` is high while working.
//
// The document uses the extended Euclidean algorithm for inversion; the
// binary (shift-and-subtract) form, which needs no divider, is this
// design's choice.
module ecc_modinv #(
  parameter int unsigned WIDTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] p,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] r
);

  logic [WIDTH-1:0] u, v, x1, x2, p_q;

  function automatic logic [WIDTH-1:0] half_mod(logic [WIDTH-1:0] x, logic [WIDTH-1:0] m);
    logic [WIDTH:0] t;
    t = x[0] ? ({1'b0, x} + {1'b0, m}) : {1'b0, x};
    return t[WIDTH:1];
  endfunction

  function automatic logic [WIDTH-1:0] sub_mod(logic [WIDTH-1:0] x, logic [WIDTH-1:0] y, logic [WIDTH-1:0] m);
    return (x >= y) ? x - y : x + (m - y);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u <= '0; v <= '0; x1 <= '0; x2 <= '0; p_q <= '0; r <= '0;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        if (a == '0) begin
          r    <= '0;
          done <= 1'b1;
        end else begin
          u <= a; v <= p; x1 <= WIDTH'(1); x2 <= '0; p_q <= p;
          busy <= 1'b1;
        end
      end else if (busy) begin
        if (u == WIDTH'(1)) begin
          r <= x1; busy <= 1'b0; done <= 1'b1;
        end else if (v == WIDTH'(1)) begin
          r <= x2; busy <= 1'b0; done <= 1'b1;
        end else if (!u[0]) begin
          u  <= u >> 1;
          x1 <= half_mod(x1, p_q);
        end else if (!v[0]) begin
          v  <= v >> 1;
          x2 <= half_mod(x2, p_q);
        end else if (u >= v) begin
          u  <= u - v;
          x1 <= sub_mod(x1, x2, p_q);
        end else begin
          v  <= v - u;
          x2 <= sub_mod(x2, x1, p_q);
        end
      end
    end
  end

endmodule
