// ctl_controller: one controller of the control layer (CTL). It is one individual of a second
// fine-grained parallel GA that chooses where the computational layer (CPL) should work: its
// 64-bit chromosome holds eight cross centres {x[3:0], y[3:0]} (gene i in bits 8i+7..8i), and a
// cross is a centre PE with its north, east, south and west neighbours. The fitness of a
// chromosome is the sum, over its eight crosses, of the CPL fitness of the five PEs of each
// cross (a cross that leaves the array or touches a PE reporting fitness 0 adds nothing).
// With all eight crosses fully converged the sum is 8 * 5 * 31 = 1240 LSBs = 38.75, the
// convergence threshold.
//
// Generation loop while run_i is high: take the fittest N/E/S/W neighbour chromosome, one-point
// crossover with it, one-bit mutation of each child, then evaluate the current chromosome again
// (the CPL keeps changing) and both children against the live CPL fitness, one cross per cycle,
// and keep the best of the three. pe_enable_o is the union of the valid crosses of the kept
// chromosome, gathered cross by cross during its evaluation: the CPL PEs this controller wants
// to operate; all others stand by.
//
// fault_i models stuck-at-zero output registers: chrom_o, fit_o and pe_enable_o read 0.
//
// Timing: one generation takes 3 + 3 * 8 + 1 = 28 cycles after an 8-cycle initial evaluation.
// Chromosome layout, fitness sum and threshold follow the architecture; the evaluation
// schedule, the validity rule for crosses and the random source are this design's own.
module ctl_controller
  import ehw_pkg::*;
#(
  parameter logic [31:0] SEED       = 32'h0BAD_5EED,
  parameter int unsigned MUT_THRESH = 128,
  parameter ctl_fit_t    CONV_FIT   = CTL_THRESH
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           run_i,
  input  logic           fault_i,
  input  fit_t           cpl_fit_i   [NPE],
  input  ctl_chrom_t     nbr_chrom_i [4],
  input  ctl_fit_t       nbr_fit_i   [4],
  output ctl_chrom_t     chrom_o,
  output ctl_fit_t       fit_o,
  output logic [NPE-1:0] pe_enable_o,
  output logic           converged_o,
  output logic [ITER_W-1:0] iter_o
);
  typedef enum logic [3:0] {
    C_INIT0, C_INIT1, C_EVAL0, C_GET, C_XO, C_MUT, C_EV1, C_EVA, C_EVB, C_SELECT
  } cst_e;

  cst_e              st_q;
  logic [31:0]       rnd_q;
  ctl_chrom_t        x1_q, xm_q, xa_q, xb_q;
  ctl_fit_t          f1_q, fr_q, fa_q, acc_q;
  logic [NPE-1:0]    m_acc_q, mr_q, ma_q;   // enable masks built during evaluation
  logic [2:0]        g_q;        // gene being evaluated
  logic [NPE-1:0]    en_q;
  logic [ITER_W-1:0] iter_q;
  logic              valid_q;    // f1_q holds an evaluation

  // Chromosome under evaluation and the fitness of its current cross.
  ctl_chrom_t  ev_chrom;
  cross_gene_t gene;
  logic [7:0]  cfit;
  always_comb begin
    unique case (st_q)
      C_EVA:   ev_chrom = xa_q;
      C_EVB:   ev_chrom = xb_q;
      default: ev_chrom = x1_q;
    endcase
    gene = cross_gene_t'(ev_chrom[8 * g_q +: 8]);
    cfit = cross_fitness(gene, cpl_fit_i);
  end
  ctl_fit_t       acc_next;
  logic [NPE-1:0] m_next;
  assign acc_next = acc_q + ctl_fit_t'(cfit);
  assign m_next   = (cfit != 8'd0) ? (m_acc_q | cross_mask(gene)) : m_acc_q;

  // Best neighbour.
  logic [1:0] best_dir;
  ctl_fit_t   best_fit;
  always_comb begin
    best_dir = 2'(DIR_N);
    best_fit = nbr_fit_i[0];
    for (int d = 1; d < 4; d++) begin
      if (nbr_fit_i[d] > best_fit) begin
        best_dir = 2'(d);
        best_fit = nbr_fit_i[d];
      end
    end
  end

  logic [5:0]  cut;
  logic [63:0] lo_mask;
  assign cut     = (rnd_q[5:0] == 6'd0) ? 6'd1 : rnd_q[5:0];
  assign lo_mask = (64'd1 << cut) - 64'd1;

  function automatic ctl_chrom_t mutate(input ctl_chrom_t c, input logic [15:0] r,
                                        input int unsigned thr);
    ctl_chrom_t v;
    v = c;
    if (32'(r[15:8]) < thr) v[r[5:0]] = ~v[r[5:0]];
    return v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= C_INIT0;
      rnd_q   <= SEED;
      x1_q    <= '0;
      xm_q    <= '0;
      xa_q    <= '0;
      xb_q    <= '0;
      f1_q    <= '0;
      fr_q    <= '0;
      fa_q    <= '0;
      acc_q   <= '0;
      m_acc_q <= '0;
      mr_q    <= '0;
      ma_q    <= '0;
      g_q     <= '0;
      en_q    <= '0;
      iter_q  <= '0;
      valid_q <= 1'b0;
    end else if (run_i) begin
      rnd_q <= lfsr_next(rnd_q);
      unique case (st_q)
        C_INIT0: begin
          x1_q[31:0] <= rnd_q;
          st_q       <= C_INIT1;
        end
        C_INIT1: begin
          x1_q[63:32] <= rnd_q;
          acc_q       <= '0;
          m_acc_q     <= '0;
          g_q         <= '0;
          st_q        <= C_EVAL0;
        end
        C_EVAL0, C_EV1, C_EVA, C_EVB: begin
          acc_q   <= acc_next;
          m_acc_q <= m_next;
          g_q     <= g_q + 3'd1;
          if (g_q == 3'(NCROSS - 1)) begin
            acc_q   <= '0;
            m_acc_q <= '0;
            unique case (st_q)
              C_EVAL0: begin
                f1_q    <= acc_next;
                en_q    <= m_next;
                valid_q <= 1'b1;
                st_q    <= C_GET;
              end
              C_EV1:   begin fr_q <= acc_next; mr_q <= m_next; st_q <= C_EVA; end
              C_EVA:   begin fa_q <= acc_next; ma_q <= m_next; st_q <= C_EVB; end
              default: begin
                // Elitist choice among X1 (re-evaluated), X', X''; children win ties.
                if (acc_next >= fa_q && acc_next >= fr_q) begin
                  x1_q <= xb_q;
                  f1_q <= acc_next;
                  en_q <= m_next;
                end else if (fa_q >= fr_q) begin
                  x1_q <= xa_q;
                  f1_q <= fa_q;
                  en_q <= ma_q;
                end else begin
                  f1_q <= fr_q;
                  en_q <= mr_q;
                end
                st_q <= C_SELECT;
              end
            endcase
          end
        end
        C_GET: begin
          xm_q <= (best_fit == '0) ? x1_q : nbr_chrom_i[best_dir];
          st_q <= C_XO;
        end
        C_XO: begin
          xa_q <= (x1_q & lo_mask) | (xm_q & ~lo_mask);
          xb_q <= (xm_q & lo_mask) | (x1_q & ~lo_mask);
          st_q <= C_MUT;
        end
        C_MUT: begin
          xa_q <= mutate(xa_q, rnd_q[15:0], MUT_THRESH);
          xb_q <= mutate(xb_q, rnd_q[31:16], MUT_THRESH);
          g_q  <= '0;
          st_q <= C_EV1;
        end
        C_SELECT: begin
          iter_q <= iter_q + 1'b1;
          st_q   <= C_GET;
        end
        default: st_q <= C_INIT0;
      endcase
    end
  end

  assign chrom_o     = fault_i ? '0 : x1_q;
  assign fit_o       = (fault_i || !valid_q) ? '0 : f1_q;
  assign pe_enable_o = fault_i ? '0 : en_q;
  assign converged_o = !fault_i && valid_q && (f1_q >= CONV_FIT);
  assign iter_o      = iter_q;
endmodule
