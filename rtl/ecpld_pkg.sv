// ecpld_pkg: constants and types shared by the time-multiplexed CPLD (eCPLD).
//
// The default sizes describe the 64-macrocell eCPLD: 8 AND-OR arrays (ePLDs) of
// 8 macrocells, joined by a byte-wide multiplexer interconnect (eConnect), with
// 16 configuration contexts held on chip. Macrocell count, ePLD count, context
// count and the 16:1 byte multiplexers with 4-bit selects follow the published
// architecture. Product terms per macrocell, ePLD inputs, pin counts and the
// configuration word width are this implementation's choices (see README).
//
// Configuration bit layout of one ePLD (per context):
//   AND plane : row r -> Cp of columns 0..NCOL-1 at bits [2r*NCOL +: NCOL],
//               Ci at [(2r+1)*NCOL +: NCOL]
//   OR plane  : macrocell m -> Cp of its N_PT terms at [2*NROW*NCOL + 2m*N_PT +: N_PT],
//               Ci at [2*NROW*NCOL + (2m+1)*N_PT +: N_PT]
// Columns: 0..N_IN-1 are the ePLD inputs; then per macrocell m three feedback
// columns: N_IN+3m expansion term, +1 combinational OR output, +2 register.
// Rows: macrocell m owns rows m*(N_PT+1) .. m*(N_PT+1)+N_PT; the last of them
// is the expansion term, the others feed the macrocell's OR gate.
package ecpld_pkg;

  // Context memory implementation: distributed memory with a one-edge context
  // change (eCPLD64_v1) or block RAM with a multi-cycle context change
  // (eCPLD64_v2).
  typedef enum logic [0:0] {
    MEM_DISTRIBUTED = 1'b0,
    MEM_BRAM        = 1'b1
  } mem_mode_e;

  localparam int unsigned BYTE_W      = 8;   // eConnect routes bytes
  localparam int unsigned N_CTX       = 16;  // stored configurations
  localparam int unsigned CTX_W       = 4;
  localparam int unsigned N_EPLD      = 8;   // 8 ePLDs ...
  localparam int unsigned N_MC        = 8;   // ... of 8 macrocells = 64
  localparam int unsigned N_PT        = 2;   // OR-ed product terms per macrocell
  localparam int unsigned IN_BYTES    = 2;   // eConnect bytes into one ePLD
  localparam int unsigned N_PIN_IN    = 8;   // circuit input bytes
  localparam int unsigned N_PIN_OUT   = 8;   // circuit output bytes
  localparam int unsigned CFG_W       = 32;  // configuration write/RAM word
  localparam int unsigned ECN_SEL_W   = 4;   // 16:1 byte multiplexer select

  function automatic int unsigned epld_ncol(int unsigned n_in, int unsigned n_mc);
    return n_in + 3 * n_mc;
  endfunction

  function automatic int unsigned epld_nrow(int unsigned n_mc, int unsigned n_pt);
    return n_mc * (n_pt + 1);
  endfunction

  function automatic int unsigned epld_cfg_bits(int unsigned n_in, int unsigned n_mc,
                                                int unsigned n_pt);
    return 2 * epld_nrow(n_mc, n_pt) * epld_ncol(n_in, n_mc) + 2 * n_mc * n_pt;
  endfunction

  function automatic int unsigned words_for(int unsigned bits, int unsigned w);
    return (bits + w - 1) / w;
  endfunction

endpackage
