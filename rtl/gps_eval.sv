// gps_eval: fitness evaluation of one computational-layer chromosome for the GPS attitude
// problem. The chromosome holds the azimuth phi (bits 0-13), elevation beta (bits 14-23) and
// length b (bits 24-31) of the antenna baseline. The unit rebuilds the baseline vector
//   x = b cos(beta) cos(phi),  y = b cos(beta) sin(phi),  z = b sin(beta)
// with two passes through one CORDIC core (first rotate (b,0) by beta, then rotate
// (b cos(beta),0) by phi) and scores its L1 distance to the measured baseline vector.
//
// Each field of the chromosome holds its value in reflected Gray code, so that neighbouring
// values are one bit flip apart and one-bit mutation can climb past binary carry boundaries;
// the fields are decoded before use. Decoded number formats (this design's choice): phi is a binary angle over one turn (phi * 360/2^14
// degrees); beta spans -90..+90 degrees as (beta - 512) * 180/1024 degrees; b is an unsigned
// integer length. The measured vector meas_*_i and all internal lengths are signed Q9.6
// (1/64 of a length unit).
//
// Fitness: e = err >> ERR_SHIFT. e = 0 gives 31 (0.96875, the convergence value). Otherwise,
// with p the position of the leading one of e and q the bit below it, fitness =
// 31 - min(30, 1 + 2p + q): a logarithmic score, so far-off solutions still rank, and a healthy
// evaluation never reports 0. Fitness 0 is left to PEs whose output registers are stuck at zero.
//
// Interface: pulse start_i with chrom_i and meas_*_i stable until done_o; done_o pulses when
// fit_o is valid (held until the next start). Latency 2*(ITER+1) + 3 cycles (37 for ITER = 16).
module gps_eval
  import ehw_pkg::*;
#(
  parameter int unsigned ERR_SHIFT = 7,   // 2^ERR_SHIFT / 64 length units per fitness grade
  parameter int unsigned ITER      = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start_i,
  input  gps_chrom_t         chrom_i,
  input  logic signed [15:0] meas_x_i,
  input  logic signed [15:0] meas_y_i,
  input  logic signed [15:0] meas_z_i,
  output logic               busy_o,
  output logic               done_o,
  output fit_t               fit_o
);
  localparam int unsigned W = 18;

  typedef enum logic [2:0] {E_IDLE, E_ELEV, E_AZIM_GO, E_AZIM, E_SCORE} est_e;
  est_e st_q;

  logic                cstart, cbusy, cdone;
  logic signed [W-1:0] cr, ccos, csin;
  logic [15:0]         ctheta;
  logic signed [W-1:0] h_q, z_q;
  fit_t                fit_q;
  logic                done_q;

  cordic #(.W(W), .ITER(ITER)) u_cordic (
    .clk, .rst_n, .start_i(cstart), .r_i(cr), .theta_i(ctheta),
    .busy_o(cbusy), .done_o(cdone), .cos_o(ccos), .sin_o(csin));

  // Gray decoding of the three fields.
  logic [13:0] phi_b, beta_b, b_b;
  assign phi_b  = gray_to_bin(chrom_i.phi);
  assign beta_b = gray_to_bin({4'd0, chrom_i.beta});
  assign b_b    = gray_to_bin({6'd0, chrom_i.b});

  // Elevation as a binary angle: (beta - 512) * 32.
  logic signed [15:0] elev;
  assign elev = 16'(($signed({2'd0, beta_b}) - 16'sd512) <<< 5);

  always_comb begin
    cstart = 1'b0;
    cr     = '0;
    ctheta = '0;
    if (st_q == E_IDLE && start_i) begin
      cstart = 1'b1;
      cr     = W'({b_b[7:0], 6'd0});
      ctheta = elev;
    end else if (st_q == E_AZIM_GO) begin
      cstart = 1'b1;
      cr     = h_q;
      ctheta = {phi_b, 2'b00};
    end
  end

  // Scoring of the finished vector.
  logic signed [W:0] dx, dy, dz;
  logic [W:0]        ax, ay, az;
  logic [W+1:0]      err, e;
  fit_t              score;
  int                lead, grade;
  always_comb begin
    dx  = (W+1)'(ccos) - (W+1)'(meas_x_i);
    dy  = (W+1)'(csin) - (W+1)'(meas_y_i);
    dz  = (W+1)'(z_q)  - (W+1)'(meas_z_i);
    ax  = dx[W] ? (W+1)'(-dx) : (W+1)'(dx);
    ay  = dy[W] ? (W+1)'(-dy) : (W+1)'(dy);
    az  = dz[W] ? (W+1)'(-dz) : (W+1)'(dz);
    err = (W+2)'(ax) + (W+2)'(ay) + (W+2)'(az);
    e   = err >> ERR_SHIFT;
    lead = -1;
    for (int p = 0; p <= W + 1; p++) if (e[p]) lead = p;
    if (lead < 0) begin
      grade = 0;
      score = FIT_MAX;
    end else begin
      grade = 1 + 2 * lead + ((lead > 0) ? int'(e[lead - 1]) : 0);
      score = (grade >= 30) ? fit_t'(1) : fit_t'(31 - grade);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= E_IDLE;
      h_q    <= '0;
      z_q    <= '0;
      fit_q  <= '0;
      done_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      unique case (st_q)
        E_IDLE:    if (start_i) st_q <= E_ELEV;
        E_ELEV:    if (cdone) begin
                     h_q  <= ccos;
                     z_q  <= csin;
                     st_q <= E_AZIM_GO;
                   end
        E_AZIM_GO: st_q <= E_AZIM;
        E_AZIM:    if (cdone) st_q <= E_SCORE;
        E_SCORE:   begin
                     fit_q  <= score;
                     done_q <= 1'b1;
                     st_q   <= E_IDLE;
                   end
        default:   st_q <= E_IDLE;
      endcase
    end
  end

  // Handshake rules: the CORDIC is never restarted while busy, and the caller starts this unit
  // only when it is idle.
  a_cordic_idle: assert property (@(posedge clk) disable iff (!rst_n) cstart |-> !cbusy);
  a_start_idle:  assert property (@(posedge clk) disable iff (!rst_n) start_i |-> !busy_o);

  assign busy_o = (st_q != E_IDLE);
  assign done_o = done_q;
  assign fit_o  = fit_q;
endmodule
