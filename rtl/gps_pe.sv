// gps_pe: one processing element of the computational layer (CPL). It is one individual of a
// fine-grained parallel genetic algorithm that searches the baseline azimuth, elevation and
// length of a GPS attitude problem. Per generation it:
//   1. reads the best chromosome and fitness of its north, east, south and west neighbours and
//      keeps the fittest one, Xm (ties go N, E, S, W in that order);
//   2. crosses its own chromosome X1 with Xm at one random point, giving X' and X'';
//   3. mutates each child with probability MUT_THRESH/256 by flipping one random bit;
//   4. evaluates both children (gps_eval) and keeps the fittest of X1, X', X'' as the new X1;
//   5. stops, converged, once the fitness of X1 reaches CONV_FIT (31 = 0.96875).
// Before the first generation X1 is drawn from the PE's LFSR and evaluated.
//
// PE_Enable (enable_i) decides whether the PE operates: with it low the PE stands by between
// generations, still showing its chromosome and fitness to its neighbours. A PE whose
// neighbours all report fitness 0 (faulty or outside the array) crosses with itself, so only
// mutation moves it on.
//
// fault_i models stuck-at-zero faults on the PE's output registers: chrom_o and fit_o read 0.
//
// Interface: start_i (one cycle) loads new GPS data and restarts the search. iter_o counts the
// generations completed since start. One generation takes 81 cycles (two 37-cycle evaluations,
// seven cycles of bookkeeping) with the default CORDIC.
//
// The generation loop follows the architecture's GA flow (get neighbours, take the maximum,
// crossover, mutation, convergence test); the random source, the mutation rule, the elitist
// replacement and the evaluation of both children are this design's choices.
module gps_pe
  import ehw_pkg::*;
#(
  parameter logic [31:0]   SEED       = 32'h1234_5678,  // non-zero LFSR seed
  parameter int unsigned   ERR_SHIFT  = 7,
  parameter int unsigned   MUT_THRESH = 128,            // mutation probability * 256
  parameter logic [4:0]    CONV_FIT   = 5'd31
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start_i,
  input  logic signed [15:0] meas_x_i,
  input  logic signed [15:0] meas_y_i,
  input  logic signed [15:0] meas_z_i,
  input  logic               enable_i,
  input  logic               fault_i,
  input  gps_chrom_t         nbr_chrom_i [4],
  input  fit_t               nbr_fit_i   [4],
  output gps_chrom_t         chrom_o,
  output fit_t               fit_o,
  output logic               converged_o,
  output logic [ITER_W-1:0]  iter_o
);
  typedef enum logic [3:0] {
    P_IDLE, P_INIT, P_EVAL0, P_WAIT, P_GET, P_XO, P_MUT, P_EVALA, P_EVALB, P_SELECT
  } pst_e;

  pst_e              st_q;
  logic [31:0]       rnd_q;
  gps_chrom_t        x1_q, xm_q, xa_q, xb_q;
  fit_t              f1_q, fa_q;
  logic [ITER_W-1:0] iter_q;
  logic              ev_go, ev_busy;
  logic              ev_done;
  fit_t              ev_fit;
  gps_chrom_t        ev_chrom;
  logic              ev_wait_q;

  gps_eval #(.ERR_SHIFT(ERR_SHIFT)) u_eval (
    .clk, .rst_n, .start_i(ev_go), .chrom_i(ev_chrom),
    .meas_x_i, .meas_y_i, .meas_z_i,
    .busy_o(ev_busy), .done_o(ev_done), .fit_o(ev_fit));

  always_comb begin
    unique case (st_q)
      P_EVALA: ev_chrom = xa_q;
      P_EVALB: ev_chrom = xb_q;
      default: ev_chrom = x1_q;
    endcase
  end
  // Launch an evaluation on entry to an evaluation state.
  assign ev_go = (st_q inside {P_EVAL0, P_EVALA, P_EVALB}) && !ev_wait_q && !ev_busy;

  // Best neighbour.
  logic [1:0] best_dir;
  fit_t       best_fit;
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

  // One-point crossover at a random cut 1..31 and one-bit mutation.
  logic [4:0]  cut;
  logic [31:0] lo_mask;
  assign cut     = (rnd_q[4:0] == 5'd0) ? 5'd1 : rnd_q[4:0];
  assign lo_mask = (32'd1 << cut) - 32'd1;

  function automatic gps_chrom_t mutate(input gps_chrom_t c, input logic [31:0] r,
                                        input int unsigned thr);
    logic [31:0] v;
    v = c;
    if (32'(r[15:8]) < thr) v[r[20:16]] = ~v[r[20:16]];
    return gps_chrom_t'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q      <= P_IDLE;
      rnd_q     <= SEED;
      x1_q      <= '0;
      xm_q      <= '0;
      xa_q      <= '0;
      xb_q      <= '0;
      f1_q      <= '0;
      fa_q      <= '0;
      iter_q    <= '0;
      ev_wait_q <= 1'b0;
    end else begin
      rnd_q <= lfsr_next(rnd_q);
      if (ev_go) ev_wait_q <= 1'b1;
      if (ev_done) ev_wait_q <= 1'b0;
      if (start_i) begin
        st_q   <= P_INIT;
        iter_q <= '0;
      end else begin
        unique case (st_q)
          P_IDLE: ;
          P_INIT: if (!ev_busy && !ev_wait_q) begin
            // Any evaluation still running from before the restart has drained.
            x1_q <= gps_chrom_t'(rnd_q);
            st_q <= P_EVAL0;
          end
          P_EVAL0: if (ev_done) begin
            f1_q <= ev_fit;
            st_q <= P_WAIT;
          end
          P_WAIT: if (f1_q < CONV_FIT && enable_i) st_q <= P_GET;
          P_GET: begin
            xm_q <= (best_fit == '0) ? x1_q : nbr_chrom_i[best_dir];
            st_q <= P_XO;
          end
          P_XO: begin
            xa_q <= gps_chrom_t'((x1_q & lo_mask) | (xm_q & ~lo_mask));
            xb_q <= gps_chrom_t'((xm_q & lo_mask) | (x1_q & ~lo_mask));
            st_q <= P_MUT;
          end
          P_MUT: begin
            xa_q <= mutate(xa_q, rnd_q, MUT_THRESH);
            xb_q <= mutate(xb_q, {rnd_q[15:0], rnd_q[31:16]}, MUT_THRESH);
            st_q <= P_EVALA;
          end
          P_EVALA: if (ev_done) begin
            fa_q <= ev_fit;
            st_q <= P_EVALB;
          end
          P_EVALB: if (ev_done) begin
            // Elitist replacement: the best of X1, X', X''; children win ties.
            if (ev_fit >= fa_q && ev_fit >= f1_q) begin
              x1_q <= xb_q;
              f1_q <= ev_fit;
            end else if (fa_q >= f1_q) begin
              x1_q <= xa_q;
              f1_q <= fa_q;
            end
            st_q <= P_SELECT;
          end
          P_SELECT: begin
            iter_q <= iter_q + 1'b1;
            st_q   <= P_WAIT;
          end
          default: st_q <= P_IDLE;
        endcase
      end
    end
  end

  assign chrom_o     = fault_i ? gps_chrom_t'('0) : x1_q;
  assign fit_o       = fault_i ? fit_t'('0) : ((st_q inside {P_IDLE, P_INIT, P_EVAL0}) ? fit_t'('0) : f1_q);
  assign converged_o = !fault_i && (st_q == P_WAIT) && (f1_q >= CONV_FIT);
  assign iter_o      = iter_q;

endmodule
