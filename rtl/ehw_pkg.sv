// ehw_pkg: types, constants and small helper functions shared by the two layers of the
// fault-tolerant evolvable-hardware platform.
//
// Computational layer (CPL): 8x8 GPS attitude PEs, each holding one 32-bit chromosome
// {b[7:0], beta[9:0], phi[13:0]} (baseline length, elevation, azimuth; bit fields as in the
// chromosome definition of the architecture; each field holds its value in Gray code) and a 5-bit fractional fitness (0 .. 31/32).
// Control layer (CTL): 8x8 controllers, each holding one 64-bit chromosome of eight 8-bit cross
// centres {x[3:0], y[3:0]} and an 11-bit fitness, the sum of the CPL fitness of the 5 PEs of
// each of the 8 crosses (maximum 8*5*31 = 1240 LSBs = 38.75, the CTL convergence threshold).
//
// Own choices: the random source is a 32-bit Galois LFSR per PE; a cross is valid only when its
// centre lies in rows/columns 1..6 (all four arms inside the array) and none of its five PEs
// reports fitness 0, which is how a PE with stuck-at-zero output registers appears.
package ehw_pkg;

  localparam int unsigned ROWS      = 8;
  localparam int unsigned COLS      = 8;
  localparam int unsigned NPE       = ROWS * COLS;   // 64 PEs per layer
  localparam int unsigned FIT_W     = 5;             // CPL fitness, fraction of 1/32
  localparam int unsigned CHROM_W   = 32;            // CPL chromosome
  localparam int unsigned CTL_CHROM_W = 64;          // CTL chromosome: 8 cross centres
  localparam int unsigned NCROSS    = 8;
  localparam int unsigned CTL_FIT_W = 11;            // up to 1240
  localparam int unsigned ITER_W    = 16;            // generation counters
  localparam logic [FIT_W-1:0]     FIT_MAX = 5'd31;              // 0.96875
  localparam logic [CTL_FIT_W-1:0] CTL_THRESH = 11'd1240;       // 38.75 = 8 * 5 * 0.96875

  // Neighbour order used on every N/E/S/W port array.
  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3} dir_e;

  typedef logic [FIT_W-1:0]       fit_t;
  typedef logic [CTL_FIT_W-1:0]   ctl_fit_t;
  typedef logic [CTL_CHROM_W-1:0] ctl_chrom_t;

  // CPL chromosome: phi in bits 0-13, beta in bits 14-23, b in bits 24-31.
  typedef struct packed {
    logic [7:0]  b;
    logic [9:0]  beta;
    logic [13:0] phi;
  } gps_chrom_t;

  // One CTL gene: the centre of a cross in the CPL.
  typedef struct packed {
    logic [3:0] x;   // column
    logic [3:0] y;   // row
  } cross_gene_t;

  // Reflected Gray code to binary, for the 14-, 10- and 8-bit chromosome fields (shorter fields
  // are zero-extended; leading zeros do not change the result).
  function automatic logic [13:0] gray_to_bin(input logic [13:0] g);
    logic [13:0] b;
    b[13] = g[13];
    for (int i = 12; i >= 0; i--) b[i] = b[i + 1] ^ g[i];
    return b;
  endfunction

  function automatic logic [13:0] bin_to_gray(input logic [13:0] b);
    return b ^ (b >> 1);
  endfunction

  // x^32 + x^22 + x^2 + x + 1, Galois form.
  function automatic logic [31:0] lfsr_next(input logic [31:0] s);
    return s[0] ? ((s >> 1) ^ 32'h8020_0003) : (s >> 1);
  endfunction

  function automatic logic cross_centre_ok(input cross_gene_t g);
    return (g.x >= 4'd1) && (g.x <= 4'(COLS - 2)) && (g.y >= 4'd1) && (g.y <= 4'(ROWS - 2));
  endfunction

  // Sum of the five CPL fitness values of the cross centred on g; 0 when the cross leaves the
  // array or touches a PE that reports fitness 0.
  function automatic logic [7:0] cross_fitness(input cross_gene_t g, input fit_t fits [NPE]);
    int unsigned c;
    logic [7:0] sum;
    logic dead;
    if (!cross_centre_ok(g)) return 8'd0;
    c = 32'(g.y) * COLS + 32'(g.x);
    dead = (fits[c] == '0) || (fits[c - COLS] == '0) || (fits[c + COLS] == '0) ||
           (fits[c - 1] == '0) || (fits[c + 1] == '0);
    sum = 8'(fits[c]) + 8'(fits[c - COLS]) + 8'(fits[c + COLS]) + 8'(fits[c - 1]) + 8'(fits[c + 1]);
    return dead ? 8'd0 : sum;
  endfunction

  // One-hot-per-PE mask of the five PEs of the cross centred on g (empty when off the array).
  function automatic logic [NPE-1:0] cross_mask(input cross_gene_t g);
    logic [NPE-1:0] m;
    int unsigned c;
    m = '0;
    if (cross_centre_ok(g)) begin
      c = 32'(g.y) * COLS + 32'(g.x);
      m[c] = 1'b1;
      m[c - COLS] = 1'b1;
      m[c + COLS] = 1'b1;
      m[c - 1] = 1'b1;
      m[c + 1] = 1'b1;
    end
    return m;
  endfunction

endpackage
