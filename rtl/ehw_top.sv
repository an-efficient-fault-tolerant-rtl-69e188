// ehw_top: two-layer fault-tolerant evolvable-hardware platform for GPS attitude
// determination. The computational layer (CPL, cpl_array) is an 8x8 mesh of PEs that run a
// fine-grained parallel GA for the baseline azimuth, elevation and length. The control layer
// (CTL, ctl_array) is a second 8x8 mesh whose GA watches the 64 CPL fitness values and picks
// eight crosses of live PEs (a PE and its four neighbours); enable_select drives the CPL
// PE_Enable lines from the fittest controller, so PEs cut off by faulty neighbours stand by
// instead of holding up convergence.
//
// Modes: ctl_mode_i = 1 runs the CTL; ctl_mode_i = 0 stops it and enables every CPL PE.
// Faults: cpl_fault_i / ctl_fault_i force the output registers of a PE / controller to zero
// (stuck-at-zero), the fault model the platform is evaluated with.
//
// Convergence (system_converged_o, registered):
//   CTL in operation:  the fittest controller has reached 38.75 (all five PEs of all eight of
//                      its crosses at fitness 31/32) and every enabled PE reports convergence
//                      (this also keeps a stale controller result from counting right after a
//                      restart, before the controllers have re-evaluated);
//   CTL out of operation: every CPL PE that reports a non-zero fitness has converged.
// attitude_o is the chromosome {b, beta, phi} of the lowest-numbered enabled, converged PE.
// cycles_o counts clock cycles since the last start_i.
//
// The two layers, their sizes, the 5-bit fitness and 64 PE_Enable interface follow the
// architecture; the convergence rule without the CTL, the attitude read-out and the cycle
// counter are this design's own.
module ehw_top
  import ehw_pkg::*;
#(
  parameter int unsigned ERR_SHIFT  = 7,
  parameter int unsigned MUT_THRESH = 128
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start_i,
  input  logic signed [15:0] meas_x_i,
  input  logic signed [15:0] meas_y_i,
  input  logic signed [15:0] meas_z_i,
  input  logic               ctl_mode_i,
  input  logic [NPE-1:0]     cpl_fault_i,
  input  logic [NPE-1:0]     ctl_fault_i,
  output logic [NPE-1:0]     pe_enable_o,
  output fit_t               cpl_fit_o       [NPE],
  output logic [NPE-1:0]     cpl_converged_o,
  output logic [ITER_W-1:0]  cpl_iter_o      [NPE],
  output ctl_fit_t           ctl_fit_o       [NPE],
  output logic [NPE-1:0]     ctl_converged_o,
  output logic [ITER_W-1:0]  ctl_iter_o      [NPE],
  output logic [5:0]         ctl_winner_o,
  output ctl_fit_t           ctl_winner_fit_o,
  output logic               system_converged_o,
  output gps_chrom_t         attitude_o,
  output logic               attitude_valid_o,
  output logic [31:0]        cycles_o
);
  gps_chrom_t     cpl_chrom [NPE];
  ctl_chrom_t     ctl_chrom [NPE];
  logic [NPE-1:0] ctl_en    [NPE];
  logic           winner_conv;

  cpl_array #(.ERR_SHIFT(ERR_SHIFT), .MUT_THRESH(MUT_THRESH)) u_cpl (
    .clk, .rst_n, .start_i, .meas_x_i, .meas_y_i, .meas_z_i,
    .enable_i(pe_enable_o), .fault_i(cpl_fault_i),
    .chrom_o(cpl_chrom), .fit_o(cpl_fit_o), .converged_o(cpl_converged_o), .iter_o(cpl_iter_o));

  ctl_array #(.MUT_THRESH(MUT_THRESH)) u_ctl (
    .clk, .rst_n, .run_i(ctl_mode_i), .fault_i(ctl_fault_i), .cpl_fit_i(cpl_fit_o),
    .chrom_o(ctl_chrom), .fit_o(ctl_fit_o), .pe_enable_o(ctl_en),
    .converged_o(ctl_converged_o), .iter_o(ctl_iter_o));

  enable_select u_sel (
    .clk, .rst_n, .ctl_mode_i, .ctl_fit_i(ctl_fit_o), .ctl_en_i(ctl_en),
    .ctl_conv_i(ctl_converged_o), .pe_enable_o, .winner_o(ctl_winner_o),
    .winner_fit_o(ctl_winner_fit_o), .winner_conv_o(winner_conv));

  // Convergence without the CTL and the attitude read-out.
  logic       all_live_conv, any_conv, all_en_conv;
  assign all_en_conv = ((pe_enable_o & ~cpl_converged_o) == '0);
  gps_chrom_t att;
  logic       att_ok;
  always_comb begin
    all_live_conv = 1'b1;
    any_conv      = 1'b0;
    att           = '0;
    att_ok        = 1'b0;
    for (int i = NPE - 1; i >= 0; i--) begin
      if (cpl_fit_o[i] != '0 && !cpl_converged_o[i]) all_live_conv = 1'b0;
      if (cpl_converged_o[i]) any_conv = 1'b1;
      if (cpl_converged_o[i] && pe_enable_o[i]) begin
        att    = cpl_chrom[i];
        att_ok = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      system_converged_o <= 1'b0;
      attitude_o         <= '0;
      attitude_valid_o   <= 1'b0;
      cycles_o           <= '0;
    end else begin
      system_converged_o <= !start_i && (ctl_mode_i ? (winner_conv && all_en_conv)
                                                    : (all_live_conv && any_conv));
      attitude_o         <= att;
      attitude_valid_o   <= !start_i && att_ok;
      cycles_o           <= start_i ? 32'd0 : cycles_o + 32'd1;
    end
  end
endmodule
