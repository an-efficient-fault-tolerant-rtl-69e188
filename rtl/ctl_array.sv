// ctl_array: the control layer, a ROWS x COLS mesh of ctl_controller elements running their own
// fine-grained parallel GA, structured like the computational layer. Every controller sees all
// 64 CPL fitness values; controllers exchange chromosome and fitness with their north, east,
// south and west neighbours only (border neighbours read 0, like faulty ones). run_i puts the
// whole layer in or out of operation; fault_i forces a controller's output registers to zero.
//
// Controller index i = row * COLS + col. The 8x8 organisation and the neighbourhood follow the
// architecture; the seeds are this design's own.
module ctl_array
  import ehw_pkg::*;
#(
  parameter int unsigned MUT_THRESH = 128,
  parameter logic [31:0] SEED_BASE  = 32'h5A5A_0F0F
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           run_i,
  input  logic [NPE-1:0] fault_i,
  input  fit_t           cpl_fit_i   [NPE],
  output ctl_chrom_t     chrom_o     [NPE],
  output ctl_fit_t       fit_o       [NPE],
  output logic [NPE-1:0] pe_enable_o [NPE],
  output logic [NPE-1:0] converged_o,
  output logic [ITER_W-1:0] iter_o   [NPE]
);
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned I = r * COLS + c;
      ctl_chrom_t nc [4];
      ctl_fit_t   nf [4];
      assign nc[DIR_N] = (r > 0)        ? chrom_o[(r > 0 ? I - COLS : I)] : ctl_chrom_t'('0);
      assign nf[DIR_N] = (r > 0)        ? fit_o[(r > 0 ? I - COLS : I)]   : ctl_fit_t'('0);
      assign nc[DIR_S] = (r < ROWS - 1) ? chrom_o[(r < ROWS - 1 ? I + COLS : I)] : ctl_chrom_t'('0);
      assign nf[DIR_S] = (r < ROWS - 1) ? fit_o[(r < ROWS - 1 ? I + COLS : I)]   : ctl_fit_t'('0);
      assign nc[DIR_E] = (c < COLS - 1) ? chrom_o[(c < COLS - 1 ? I + 1 : I)] : ctl_chrom_t'('0);
      assign nf[DIR_E] = (c < COLS - 1) ? fit_o[(c < COLS - 1 ? I + 1 : I)]   : ctl_fit_t'('0);
      assign nc[DIR_W] = (c > 0)        ? chrom_o[(c > 0 ? I - 1 : I)] : ctl_chrom_t'('0);
      assign nf[DIR_W] = (c > 0)        ? fit_o[(c > 0 ? I - 1 : I)]   : ctl_fit_t'('0);

      ctl_controller #(
        .SEED(SEED_BASE ^ (32'(I) * 32'h85EB_CA6B) | 32'h1), .MUT_THRESH(MUT_THRESH)
      ) u_ctl (
        .clk, .rst_n, .run_i, .fault_i(fault_i[I]), .cpl_fit_i,
        .nbr_chrom_i(nc), .nbr_fit_i(nf),
        .chrom_o(chrom_o[I]), .fit_o(fit_o[I]), .pe_enable_o(pe_enable_o[I]),
        .converged_o(converged_o[I]), .iter_o(iter_o[I]));
    end
  end
endmodule
