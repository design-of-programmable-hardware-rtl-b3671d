// ecc_modmul: interleaved modular multiplier, r = a * b mod p.
//
// The multiplier bits are scanned from the most significant end. Each
// cycle the partial result is doubled and reduced, then `a` is added if
// the current bit of `b` is set and the sum is reduced again, so the partial
// result never exceeds 2p and only subtractions are needed. WIDTH cycles
// per product.
//
// Interface: pulse `start` with a, b < p and p odd, p < 2^WIDTH. `done`
// pulses with `r` valid WIDTH + 1 cycles after `start`; `busy` is high in
// between and `start` is ignored then.
//
// The document names interleaved modular multiplication as its multiplier;
// the bit-serial schedule and the handshake are this design's choices.
module ecc_modmul #(
  parameter int unsigned WIDTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] p,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] r
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] a_q, b_q, p_q;
  logic [CW-1:0]    cnt_q;
  logic [WIDTH:0]   dbl, dbl_red, sum, sum_red;

  always_comb begin
    dbl     = {r, 1'b0};
    dbl_red = (dbl >= {1'b0, p_q}) ? dbl - {1'b0, p_q} : dbl;
    sum     = dbl_red + (b_q[WIDTH-1] ? {1'b0, a_q} : '0);
    sum_red = (sum >= {1'b0, p_q}) ? sum - {1'b0, p_q} : sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; b_q <= '0; p_q <= '0; r <= '0;
      cnt_q <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        a_q   <= a;
        b_q   <= b;
        p_q   <= p;
        r     <= '0;
        cnt_q <= CW'(WIDTH);
        busy  <= 1'b1;
      end else if (busy) begin
        r     <= sum_red[WIDTH-1:0];
        b_q   <= b_q << 1;
        cnt_q <= cnt_q - 1'b1;
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
