// ecdsa_sign_verify: ECDSA signature generation and verification.
//
// Signing (mode 0), private key d, per-signature random k, message hash z:
//   (x1, y1) = k * G,  r = x1 mod n,  s = k^-1 * (z + r*d) mod n.
// A zero r or s is reported with `sig_err` (choose another k).
// Verification (mode 1), public key Q and signature (r, s):
//   r and s must lie in [1, n-1];  w = s^-1 mod n,  u1 = z*w,  u2 = r*w,
//   X = u1*G + u2*Q;  the signature is valid when X is not the point at
//   infinity and X.x mod n = r (`sig_ok`).
// Arithmetic modulo the group order n uses a private interleaved multiplier
// and inverter; reductions of a value that may exceed n (x1, z, X.x) are
// products by 1, which the interleaved multiplier reduces for any b. The
// scalar multiplications, addition and doubling use the curve units.
//
// Interface: pulse `start` with `mode` and the inputs valid; `done` pulses
// with the results. The hash z is the leftmost WIDTH bits of the digest,
// supplied by the caller. `busy` is high in between.
//
// The signing and verification equations are standard ECDSA, which the
// document's signature figure and its sign/verify validation follow; the
// operation order and the interface are this design's choices.
module ecdsa_sign_verify #(
  parameter int unsigned WIDTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             mode,        // 0 = sign, 1 = verify
  input  logic [WIDTH-1:0] curve_p,
  input  logic [WIDTH-1:0] curve_a,
  input  logic [WIDTH-1:0] curve_gx,
  input  logic [WIDTH-1:0] curve_gy,
  input  logic [WIDTH-1:0] curve_n,
  input  logic [WIDTH-1:0] hash_z,
  input  logic [WIDTH-1:0] priv_key,
  input  logic [WIDTH-1:0] nonce_k,
  input  logic [WIDTH-1:0] pub_x,
  input  logic [WIDTH-1:0] pub_y,
  input  logic [WIDTH-1:0] sig_r_in,
  input  logic [WIDTH-1:0] sig_s_in,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] sig_r,
  output logic [WIDTH-1:0] sig_s,
  output logic             sig_err,
  output logic             sig_ok
);

  typedef enum logic [3:0] {
    S_IDLE, S_KG, S_RMOD, S_KINV, S_RD, S_ZMOD, S_S,
    V_WINV, V_U1, V_U2, V_PM1, V_PM2, V_SUM, V_XMOD
  } state_t;
  state_t state_q;

  logic [WIDTH-1:0] n_q, z_q, d_q, k_q, r_q, t_q, w_q, u1_q, u2_q;
  logic [WIDTH-1:0] x1_q, y1_q;
  logic             inf1_q;

  // arithmetic modulo n
  logic             mul_start, mul_busy, mul_done, inv_start, inv_busy, inv_done;
  logic [WIDTH-1:0] mul_a, mul_b, mul_r, inv_a, inv_r;
  ecc_modmul #(.WIDTH(WIDTH)) u_mul (
    .clk, .rst_n, .start(mul_start), .a(mul_a), .b(mul_b), .p(n_q), .busy(mul_busy), .done(mul_done), .r(mul_r));
  ecc_modinv #(.WIDTH(WIDTH)) u_inv (
    .clk, .rst_n, .start(inv_start), .a(inv_a), .p(n_q), .busy(inv_busy), .done(inv_done), .r(inv_r));

  // curve operations
  logic             pm_start, pm_busy, pm_done, pm_inf;
  logic [WIDTH-1:0] pm_k, pm_px, pm_py, pm_x, pm_y;
  ecc_point_mul #(.WIDTH(WIDTH)) u_pmul (
    .clk, .rst_n, .start(pm_start), .k(pm_k), .p(curve_p), .a(curve_a), .px(pm_px), .py(pm_py),
    .busy(pm_busy), .done(pm_done), .rx(pm_x), .ry(pm_y), .r_inf(pm_inf));

  logic             pa_start, pa_busy, pa_done, pa_inf, pd_start, pd_busy, pd_done, pd_inf;
  logic [WIDTH-1:0] pa_x, pa_y, pd_x, pd_y;
  logic             same_pt;
  ecc_point_add #(.WIDTH(WIDTH)) u_padd (
    .clk, .rst_n, .start(pa_start), .p(curve_p), .px(x1_q), .py(y1_q), .p_inf(inf1_q),
    .qx(pm_x), .qy(pm_y), .q_inf(pm_inf), .busy(pa_busy), .done(pa_done), .rx(pa_x), .ry(pa_y), .r_inf(pa_inf));
  ecc_point_double #(.WIDTH(WIDTH)) u_pdbl (
    .clk, .rst_n, .start(pd_start), .p(curve_p), .a(curve_a), .px(x1_q), .py(y1_q), .p_inf(inf1_q),
    .busy(pd_busy), .done(pd_done), .rx(pd_x), .ry(pd_y), .r_inf(pd_inf));

  assign same_pt = !inf1_q && !pm_inf && x1_q == pm_x && y1_q == pm_y;
  assign busy    = (state_q != S_IDLE);

  function automatic logic [WIDTH-1:0] add_mod(logic [WIDTH-1:0] x, logic [WIDTH-1:0] y, logic [WIDTH-1:0] m);
    logic [WIDTH:0] sum;
    sum = {1'b0, x} + {1'b0, y};
    return (sum >= {1'b0, m}) ? WIDTH'(sum - {1'b0, m}) : WIDTH'(sum);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      {n_q, z_q, d_q, k_q, r_q, t_q, w_q, u1_q, u2_q, x1_q, y1_q} <= '0;
      inf1_q <= 1'b1;
      {mul_a, mul_b, inv_a, pm_k, pm_px, pm_py} <= '0;
      {mul_start, inv_start, pm_start, pa_start, pd_start} <= '0;
      sig_r <= '0; sig_s <= '0; sig_err <= 1'b0; sig_ok <= 1'b0; done <= 1'b0;
    end else begin
      {mul_start, inv_start, pm_start, pa_start, pd_start} <= '0;
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          n_q <= curve_n; z_q <= hash_z; d_q <= priv_key; k_q <= nonce_k;
          sig_err <= 1'b0; sig_ok <= 1'b0;
          if (!mode) begin
            pm_k <= nonce_k; pm_px <= curve_gx; pm_py <= curve_gy; pm_start <= 1'b1;
            state_q <= S_KG;
          end else if (sig_r_in == '0 || sig_r_in >= curve_n || sig_s_in == '0 || sig_s_in >= curve_n) begin
            done <= 1'b1;                        // out of range: invalid
          end else begin
            r_q <= sig_r_in;
            inv_a <= sig_s_in; inv_start <= 1'b1;
            state_q <= V_WINV;
          end
        end
        // ---------------------------------------------------------- signing
        S_KG: if (pm_done) begin                 // r = x1 mod n
          mul_a <= WIDTH'(1); mul_b <= pm_x; mul_start <= 1'b1;
          state_q <= S_RMOD;
        end
        S_RMOD: if (mul_done) begin
          r_q <= mul_r;
          inv_a <= k_q; inv_start <= 1'b1;       // k < n is the caller's duty
          state_q <= S_KINV;
        end
        S_KINV: if (inv_done) begin
          w_q <= inv_r;                          // k^-1
          mul_a <= r_q; mul_b <= d_q; mul_start <= 1'b1;
          state_q <= S_RD;
        end
        S_RD: if (mul_done) begin
          t_q <= mul_r;                          // r*d
          mul_a <= WIDTH'(1); mul_b <= z_q; mul_start <= 1'b1;
          state_q <= S_ZMOD;
        end
        S_ZMOD: if (mul_done) begin
          mul_a <= w_q; mul_b <= add_mod(mul_r, t_q, n_q); mul_start <= 1'b1;
          state_q <= S_S;
        end
        S_S: if (mul_done) begin
          sig_r <= r_q; sig_s <= mul_r;
          sig_err <= (r_q == '0) || (mul_r == '0);
          done <= 1'b1;
          state_q <= S_IDLE;
        end
        // ---------------------------------------------------------- verification
        V_WINV: if (inv_done) begin
          w_q <= inv_r;
          mul_a <= inv_r; mul_b <= z_q; mul_start <= 1'b1;
          state_q <= V_U1;
        end
        V_U1: if (mul_done) begin
          u1_q <= mul_r;
          mul_a <= w_q; mul_b <= r_q; mul_start <= 1'b1;
          state_q <= V_U2;
        end
        V_U2: if (mul_done) begin
          u2_q <= mul_r;
          pm_k <= u1_q; pm_px <= curve_gx; pm_py <= curve_gy; pm_start <= 1'b1;
          state_q <= V_PM1;
        end
        V_PM1: if (pm_done) begin
          x1_q <= pm_x; y1_q <= pm_y; inf1_q <= pm_inf;
          pm_k <= u2_q; pm_px <= pub_x; pm_py <= pub_y; pm_start <= 1'b1;
          state_q <= V_PM2;
        end
        V_PM2: if (pm_done) begin
          if (same_pt) pd_start <= 1'b1;
          else         pa_start <= 1'b1;
          state_q <= V_SUM;
        end
        V_SUM: if (pa_done || pd_done) begin
          if (pa_done ? pa_inf : pd_inf) begin
            done <= 1'b1;                        // X = O: invalid
            state_q <= S_IDLE;
          end else begin
            mul_a <= WIDTH'(1); mul_b <= pa_done ? pa_x : pd_x; mul_start <= 1'b1;
            state_q <= V_XMOD;
          end
        end
        V_XMOD: if (mul_done) begin
          sig_ok <= (mul_r == r_q);
          done <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
