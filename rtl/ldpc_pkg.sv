// ldpc_pkg: constants and types shared by the programmable IEEE 802.16e-style
// LDPC encoder.
//
// The code family is quasi-cyclic: a model matrix of MB x NB shift values (-1
// for an all-zero block) is expanded with a zf x zf circulant per entry. The
// largest frame is NB*ZF_MAX = 2304 bits (rate 1/2, zf = 96), which sizes all
// memories. The sparse H is kept as a list of 16-bit column indices of its
// ones (16 Kbyte for 8192 entries), and bit vectors are kept in four
// interleaved one-bit banks so that four bits are read or written per access.
//
// Vector memory map (bit addresses):
//   0 .. n-1              codeword [s | p1 | p2], s = info bits (k = kb*zf),
//                         p1 = first parity block (zf bits), p2 = rest (m-zf)
//   LAMBDA_BASE ..        lambda = H_info * s (m bits; A*s then C*s)
//   TMP_BASE ..           scratch vector of m-zf bits
package ldpc_pkg;

  // Code family limits (IEEE 802.16e: 24 block columns, zf from 24 to 96).
  localparam int unsigned NB       = 24;   // block columns of the model matrix
  localparam int unsigned MB_MAX   = 12;   // block rows at rate 1/2
  localparam int unsigned ZF_MAX   = 96;   // largest expansion factor
  localparam int unsigned Z0       = 96;   // expansion factor the model values are given for
  localparam int unsigned N_MAX    = NB * ZF_MAX;        // 2304
  localparam int unsigned M_MAX    = MB_MAX * ZF_MAX;    // 1152

  // Four parallel banks: four bits per vector-memory word.
  localparam int unsigned LANES    = 4;

  // Vector memory.
  localparam int unsigned LAMBDA_BASE = N_MAX;                 // 2304
  localparam int unsigned TMP_BASE    = N_MAX + M_MAX;         // 3456
  localparam int unsigned VBITS       = TMP_BASE + M_MAX;      // 4608
  localparam int unsigned VWORDS      = VBITS / LANES;         // 1152
  localparam int unsigned VBA_W       = 13;                    // bit address width
  localparam int unsigned VWA_W       = VBA_W - 2;             // word address width

  // Index memory: 8192 entries x 16 bits = 16 Kbyte.
  localparam int unsigned IDX_DEPTH = 8192;
  localparam int unsigned IDX_AW    = 13;
  localparam int unsigned COL_W     = 14;

  // Model matrix store.
  localparam int unsigned MM_DEPTH = MB_MAX * NB;   // 288
  localparam int unsigned MM_AW    = 9;

  typedef logic [6:0]     zf_t;      // expansion factor / shift value
  typedef logic [3:0]     mb_t;      // number of block rows
  typedef logic [4:0]     kb_t;      // number of info block columns
  typedef logic signed [7:0] model_t;// model-matrix entry, -1 = zero block
  typedef logic [VBA_W-1:0] vbaddr_t;
  typedef logic [VWA_W-1:0] vwaddr_t;
  typedef logic [IDX_AW-1:0] iaddr_t;
  typedef logic [IDX_AW:0]   icount_t; // entry count, 0 .. IDX_DEPTH

  // How a model shift value is adapted to zf.
  typedef enum logic {
    SCALE_FLOOR = 1'b0,   // floor(p * zf / Z0)   (all rates but 2/3A)
    SCALE_MOD   = 1'b1    // p mod zf             (rate 2/3A)
  } scale_mode_e;

  // One entry of the sparse-H index list.
  typedef struct packed {
    logic             last;  // final entry of its row
    logic             nul;   // row has no one: contributes 0
    logic [COL_W-1:0] col;   // column of the one, relative to the source vector
  } idx_entry_t;

  // Vector memory port requests.
  typedef struct packed {
    logic    en;
    vwaddr_t addr;
  } vrd_req_t;

  typedef struct packed {
    logic             en;
    vwaddr_t          addr;
    logic [LANES-1:0] data;
    logic [LANES-1:0] mask;   // per-bank write enable
  } vwr_req_t;

  // Index memory port requests.
  typedef struct packed {
    logic   en;
    iaddr_t addr;
  } ird_req_t;

  typedef struct packed {
    logic       en;
    iaddr_t     addr;
    idx_entry_t data;
  } iwr_req_t;

endpackage
