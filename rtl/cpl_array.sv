// cpl_array: the computational layer, a ROWS x COLS mesh of gps_pe elements running one
// fine-grained parallel GA. Each PE exchanges its best chromosome and fitness with its
// immediate north, east, south and west neighbours; a missing neighbour at the array border
// reads chromosome 0 and fitness 0, the same as a faulty one. The mesh has no wrap-around.
//
// PE index i = row * COLS + col, row 0 at the north edge. All PEs share the measured baseline
// and the start pulse; each has its own PE_Enable bit and fault-injection bit and a distinct
// LFSR seed derived from its index. Per-PE fitness, convergence and generation counts come
// out for the control layer and for observation.
//
// The 8x8 size and the N/E/S/W neighbourhood follow the architecture; the seeds are this
// design's own.
module cpl_array
  import ehw_pkg::*;
#(
  parameter int unsigned ERR_SHIFT  = 7,
  parameter int unsigned MUT_THRESH = 128,
  parameter logic [31:0] SEED_BASE  = 32'hACE1_0001
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start_i,
  input  logic signed [15:0] meas_x_i,
  input  logic signed [15:0] meas_y_i,
  input  logic signed [15:0] meas_z_i,
  input  logic [NPE-1:0]     enable_i,
  input  logic [NPE-1:0]     fault_i,
  output gps_chrom_t         chrom_o     [NPE],
  output fit_t               fit_o       [NPE],
  output logic [NPE-1:0]     converged_o,
  output logic [ITER_W-1:0]  iter_o      [NPE]
);
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned I = r * COLS + c;
      gps_chrom_t nc [4];
      fit_t       nf [4];
      assign nc[DIR_N] = (r > 0)        ? chrom_o[(r > 0 ? I - COLS : I)] : gps_chrom_t'('0);
      assign nf[DIR_N] = (r > 0)        ? fit_o[(r > 0 ? I - COLS : I)]   : fit_t'('0);
      assign nc[DIR_S] = (r < ROWS - 1) ? chrom_o[(r < ROWS - 1 ? I + COLS : I)] : gps_chrom_t'('0);
      assign nf[DIR_S] = (r < ROWS - 1) ? fit_o[(r < ROWS - 1 ? I + COLS : I)]   : fit_t'('0);
      assign nc[DIR_E] = (c < COLS - 1) ? chrom_o[(c < COLS - 1 ? I + 1 : I)] : gps_chrom_t'('0);
      assign nf[DIR_E] = (c < COLS - 1) ? fit_o[(c < COLS - 1 ? I + 1 : I)]   : fit_t'('0);
      assign nc[DIR_W] = (c > 0)        ? chrom_o[(c > 0 ? I - 1 : I)] : gps_chrom_t'('0);
      assign nf[DIR_W] = (c > 0)        ? fit_o[(c > 0 ? I - 1 : I)]   : fit_t'('0);

      gps_pe #(
        .SEED(SEED_BASE ^ (32'(I) * 32'h9E37_79B9) | 32'h1),
        .ERR_SHIFT(ERR_SHIFT), .MUT_THRESH(MUT_THRESH)
      ) u_pe (
        .clk, .rst_n, .start_i, .meas_x_i, .meas_y_i, .meas_z_i,
        .enable_i(enable_i[I]), .fault_i(fault_i[I]),
        .nbr_chrom_i(nc), .nbr_fit_i(nf),
        .chrom_o(chrom_o[I]), .fit_o(fit_o[I]),
        .converged_o(converged_o[I]), .iter_o(iter_o[I]));
    end
  end
endmodule
