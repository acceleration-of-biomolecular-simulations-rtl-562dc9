// md_pkg -- types and constants shared by the non-bonded force kernel.
//
// Sizes follow the target run: atom types index an n1 x n1 coefficient table
// with n1 = 69, and each on-board memory bank holds 4 MB as 64-bit words
// (64 MB over 16 banks). All physical quantities are binary32 values; the
// global sums are binary64.
//
// Packing of the 64-bit on-board memory words (two 32-bit values per word,
// low half first): AL/BL = {Py, Px}, AH/BH = {q, Pz}, CL/DL = {nn, type}.
// The "B"/"D" banks are copies of the "A"/"C" banks, so that atom i and atom j
// never compete for the same single-ported bank.
package md_pkg;
  import fp_pkg::*;

  localparam int NTYPES   = 69;                      // n1, coefficient table side
  localparam int TYPE_W   = $clog2(NTYPES);          // 7 bits
  localparam int LJ_DEPTH = NTYPES * NTYPES;         // 4761 entries
  localparam int LJ_AW    = $clog2(LJ_DEPTH);        // 13 bits
  localparam int OBM_DEPTH = 524288;                 // 4 MB of 64-bit words
  localparam int OBM_AW    = $clog2(OBM_DEPTH);      // 19 bits

  // Bank numbering of the host write port.
  typedef enum logic [2:0] {
    BANK_AL = 3'd0,   // {Py, Px}  atom i copy
    BANK_AH = 3'd1,   // {q,  Pz}  atom i copy
    BANK_CL = 3'd2,   // {nn, tp}  atom i copy
    BANK_BL = 3'd3,   // {Py, Px}  atom j copy
    BANK_BH = 3'd4,   // {q,  Pz}  atom j copy
    BANK_DL = 3'd5    // {nn, tp}  atom j copy
  } obm_bank_e;

  // One entry of the lj1..lj4 coefficient table.
  typedef struct packed {
    f32_t lj4;
    f32_t lj3;
    f32_t lj2;
    f32_t lj1;
  } lj_coeff_t;

  // Run-time scalars passed to the kernel with each call.
  typedef struct packed {
    f32_t g_ewald;          // Ewald splitting parameter
    f32_t qqrd2e;           // Coulomb conversion constant
    f32_t cut_coulsq;       // Coulomb cut-off squared
    f32_t cut_ljsq;         // outer LJ (switching) cut-off squared
    f32_t cut_lj_innersq;   // inner LJ (switching) cut-off squared
    f32_t inv_denom_lj;     // 1 / (cut_ljsq - cut_lj_innersq)^3
    f32_t cut_bothsq;       // max(cut_coulsq, cut_ljsq)
  } force_params_t;

  // Atom i and atom j of one pair, as issued by the sequencer.
  typedef struct packed {
    f32_t             xi, yi, zi, qi;
    f32_t             xj, yj, zj, qj;
    logic [TYPE_W-1:0] ti, tj;
    logic             last;       // last neighbour of atom i
    logic             last_atom;  // last pair of the whole call
    logic             dummy;      // atom i has no neighbours: contributes zero
  } pair_t;

  // Input of the force pipeline: a pair with its LJ coefficients.
  typedef struct packed {
    f32_t      xi, yi, zi, qi;
    f32_t      xj, yj, zj, qj;
    lj_coeff_t lj;
    logic      last;
    logic      last_atom;
    logic      dummy;
  } pair_in_t;

  // Result of one pair: force on atom i, its share of energies and virial.
  typedef struct packed {
    f32_t       fx, fy, fz;
    f32_t       evdwl, ecoul;
    f32_t [5:0] v;             // xx, yy, zz, xy, xz, yz
    logic       last;
    logic       last_atom;
  } pair_out_t;

endpackage
