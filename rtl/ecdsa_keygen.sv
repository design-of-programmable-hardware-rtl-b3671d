// ecdsa_keygen: ECDSA key pair generation, public key Q = d * G.
//
// The private key d must satisfy 1 <= d < n, n being the order of the base
// point G; a key outside that range is refused with `key_err` and no
// multiplication. Otherwise the scalar multiplier computes Q. The curve
// (field prime p, coefficient a, base point G, order n) is supplied on
// ports, so the same hardware serves any curve whose numbers fit in WIDTH
// bits; for example secp256k1 at WIDTH = 256, or a small curve for testing.
//
// Interface: pulse `start` with all inputs valid; `done` pulses with
// pub_x/pub_y valid (or with key_err set). `busy` is high in between.
//
// The document uses ECDSA key pair generation to give each participant a
// key pair whose public key is the participant's enroll ID. The range check
// and the curve-on-ports interface are this design's choices.
module ecdsa_keygen #(
  parameter int unsigned WIDTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] priv_key,
  input  logic [WIDTH-1:0] curve_p,
  input  logic [WIDTH-1:0] curve_a,
  input  logic [WIDTH-1:0] curve_gx,
  input  logic [WIDTH-1:0] curve_gy,
  input  logic [WIDTH-1:0] curve_n,
  output logic             busy,
  output logic             done,
  output logic             key_err,
  output logic [WIDTH-1:0] pub_x,
  output logic [WIDTH-1:0] pub_y
);

  logic mul_start, mul_busy, mul_done, mul_inf;
  logic [WIDTH-1:0] mx, my;
  logic key_ok;

  assign key_ok    = (priv_key != '0) && (priv_key < curve_n);
  assign mul_start = start && !busy && key_ok;

  ecc_point_mul #(.WIDTH(WIDTH)) u_mul (
    .clk, .rst_n, .start(mul_start), .k(priv_key), .p(curve_p), .a(curve_a),
    .px(curve_gx), .py(curve_gy),
    .busy(mul_busy), .done(mul_done), .rx(mx), .ry(my), .r_inf(mul_inf));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; key_err <= 1'b0; pub_x <= '0; pub_y <= '0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        if (key_ok) begin
          busy <= 1'b1; key_err <= 1'b0;
        end else begin
          done <= 1'b1; key_err <= 1'b1; pub_x <= '0; pub_y <= '0;
        end
      end else if (busy && mul_done) begin
        busy    <= 1'b0;
        done    <= 1'b1;
        key_err <= mul_inf;       // only possible when n is not G's order
        pub_x   <= mx;
        pub_y   <= my;
      end
    end
  end

endmodule
