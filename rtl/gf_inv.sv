// gf_inv: sequential inverter in GF(2^M).
//
// By Fermat's little theorem a^-1 = a^(2^M - 2) = a^2 * a^4 * ... * a^(2^(M-1)).
// On start the squarer loads s = a^2 and the product r = 1; each following
// cycle r <= r * s and s <= s^2, for M-1 cycles. The inverse of zero comes
// out as zero (the sequencer never asks for it).
//
// Interface: start (one cycle, while not busy) samples a. Timing: done is high
// for one cycle exactly M-1 cycles after the start edge, with y valid from then
// until the next start. Two gf_mul instances are the whole datapath. The
// square-and-multiply method is this design's choice.
module gf_inv #(
  parameter int unsigned M    = gja_pkg::GF_M_DEF,
  parameter logic [M:0]  POLY = gja_pkg::GF_POLY_DEF[M:0]
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [M-1:0] a,
  output logic         busy,
  output logic         done,
  output logic [M-1:0] y
);

  localparam int unsigned CW = $clog2(M);

  logic [M-1:0]  s, r, sq_in, sq_out, rs_out;
  logic [CW-1:0] cnt;

  assign sq_in = start ? a : s;

  gf_mul #(.M(M), .POLY(POLY)) u_sq (.a(sq_in), .b(sq_in), .p(sq_out));
  gf_mul #(.M(M), .POLY(POLY)) u_rs (.a(r),     .b(s),     .p(rs_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s    <= '0;
      r    <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else if (start) begin
      s    <= sq_out;
      r    <= M'(1);
      cnt  <= CW'(M - 1);
      busy <= 1'b1;
      done <= 1'b0;
    end else if (busy) begin
      r    <= rs_out;
      s    <= sq_out;
      cnt  <= cnt - 1'b1;
      if (cnt == CW'(1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end else begin
      done <= 1'b0;
    end
  end

  assign y = r;

endmodule
