// enable_select: decides which PE_Enable vector drives the computational layer. Every one of
// the 64 controllers produces a full 64-bit PE_Enable vector; this block forwards the vector of
// the fittest controller (lowest index on a tie). When the control layer is out of operation
// (ctl_mode_i low), or while no controller reports a non-zero fitness, every PE is enabled.
//
// Timing: one register stage; outputs follow the inputs one cycle later. Reset enables all PEs.
// The winner index, its fitness and its convergence flag come out for observation.
//
// That each controller drives 64 enable lines is the architecture's; how the 64 vectors are
// reduced to the one that reaches each PE is not specified there, and the fittest-controller
// choice is this design's own.
module enable_select
  import ehw_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ctl_mode_i,
  input  ctl_fit_t       ctl_fit_i [NPE],
  input  logic [NPE-1:0] ctl_en_i  [NPE],
  input  logic [NPE-1:0] ctl_conv_i,
  output logic [NPE-1:0] pe_enable_o,
  output logic [5:0]     winner_o,
  output ctl_fit_t       winner_fit_o,
  output logic           winner_conv_o
);
  logic [5:0] best;
  ctl_fit_t   best_fit;
  always_comb begin
    best     = '0;
    best_fit = ctl_fit_i[0];
    for (int i = 1; i < NPE; i++) begin
      if (ctl_fit_i[i] > best_fit) begin
        best     = 6'(i);
        best_fit = ctl_fit_i[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pe_enable_o   <= '1;
      winner_o      <= '0;
      winner_fit_o  <= '0;
      winner_conv_o <= 1'b0;
    end else begin
      winner_o      <= best;
      winner_fit_o  <= best_fit;
      winner_conv_o <= ctl_mode_i && ctl_conv_i[best];
      pe_enable_o   <= (!ctl_mode_i || best_fit == '0) ? '1 : ctl_en_i[best];
    end
  end
endmodule
