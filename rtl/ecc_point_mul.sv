// ecc_point_mul: scalar point multiplication R = k * P by left-to-right
// double-and-add.
//
// R starts at the point at infinity. For each bit of k, from the most
// significant one, R is doubled (ecc_point_double) and, if the bit is 1,
// P is added (ecc_point_add). When R equals P at an addition step the
// doubler is used instead, since the chord rule does not apply there.
// Leading zero bits of k cost one cycle each, since doubling O is O.
//
// Interface: pulse `start` with k, the curve (p, a) and P valid; `done`
// pulses with R. Roughly WIDTH doublings plus one addition per set bit;
// each doubling takes about 5*WIDTH to 7*WIDTH cycles.
//
// The document builds point multiplication from its point addition and
// doubling modules; the double-and-add order is this design's choice.
module ecc_point_mul #(
  parameter int unsigned WIDTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] k,
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] px, py,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] rx, ry,
  output logic             r_inf
);

  localparam int unsigned CW = $clog2(WIDTH + 1);

  typedef enum logic [2:0] {S_IDLE, S_DBL, S_DBL_WAIT, S_ADD, S_ADD_WAIT} state_t;
  state_t state_q;

  logic [WIDTH-1:0] k_q, p_q, a_q, gx, gy;
  logic [CW-1:0]    bits_q;
  logic             dbl_start, dbl_busy, dbl_done, dbl_inf;
  logic             add_start, add_busy, add_done, add_inf;
  logic [WIDTH-1:0] dbl_x, dbl_y, add_x, add_y;
  logic             use_dbl_q;   // the addition step is R + R

  ecc_point_double #(.WIDTH(WIDTH)) u_dbl (
    .clk, .rst_n, .start(dbl_start), .p(p_q), .a(a_q), .px(rx), .py(ry), .p_inf(r_inf),
    .busy(dbl_busy), .done(dbl_done), .rx(dbl_x), .ry(dbl_y), .r_inf(dbl_inf));

  ecc_point_add #(.WIDTH(WIDTH)) u_add (
    .clk, .rst_n, .start(add_start), .p(p_q), .px(rx), .py(ry), .p_inf(r_inf),
    .qx(gx), .qy(gy), .q_inf(1'b0),
    .busy(add_busy), .done(add_done), .rx(add_x), .ry(add_y), .r_inf(add_inf));

  assign busy = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      {k_q, p_q, a_q, gx, gy, rx, ry} <= '0;
      r_inf <= 1'b1; bits_q <= '0; done <= 1'b0;
      dbl_start <= 1'b0; add_start <= 1'b0; use_dbl_q <= 1'b0;
    end else begin
      done      <= 1'b0;
      dbl_start <= 1'b0;
      add_start <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          k_q <= k; p_q <= p; a_q <= a; gx <= px; gy <= py;
          rx <= '0; ry <= '0; r_inf <= 1'b1;
          bits_q  <= CW'(WIDTH);
          state_q <= S_DBL;
        end
        S_DBL: begin
          if (bits_q == '0) begin
            done <= 1'b1;
            state_q <= S_IDLE;
          end else if (r_inf) begin
            state_q <= S_ADD;         // 2 * O = O
          end else begin
            dbl_start <= 1'b1;
            use_dbl_q <= 1'b0;
            state_q   <= S_DBL_WAIT;
          end
        end
        S_DBL_WAIT: if (dbl_done) begin
          rx <= dbl_x; ry <= dbl_y; r_inf <= dbl_inf;
          state_q <= S_ADD;
        end
        S_ADD: begin
          bits_q <= bits_q - 1'b1;
          k_q    <= k_q << 1;
          if (k_q[WIDTH-1]) begin
            use_dbl_q <= !r_inf && rx == gx && ry == gy;
            if (!r_inf && rx == gx && ry == gy) dbl_start <= 1'b1;
            else                                add_start <= 1'b1;
            state_q <= S_ADD_WAIT;
          end else begin
            state_q <= S_DBL;
          end
        end
        S_ADD_WAIT: begin
          if (use_dbl_q && dbl_done) begin
            rx <= dbl_x; ry <= dbl_y; r_inf <= dbl_inf;
            state_q <= S_DBL;
          end else if (!use_dbl_q && add_done) begin
            rx <= add_x; ry <= add_y; r_inf <= add_inf;
            state_q <= S_DBL;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
