// he_pkg: shared types and default sizes of the CKKS accelerator.
//
// The defaults follow the main configuration used for the KeySwitch and kernel comparisons:
// polynomial length N = 8192, 33-bit RNS moduli q_i, NTT/INTT parallelism 16 butterflies and
// element-wise parallelism 8 lanes. The number of ciphertext moduli K = 3 is this design's choice
// (the smallest count in the KeySwitch latency comparison).
package he_pkg;

  localparam int unsigned DEF_N      = 8192;  // polynomial length
  localparam int unsigned DEF_W      = 33;    // bit width of one RNS modulus q_i
  localparam int unsigned DEF_K      = 3;     // ciphertext moduli; a special modulus p is added
  localparam int unsigned DEF_P_NTT  = 16;    // butterflies per cycle in NTT/INTT
  localparam int unsigned DEF_P_MULT = 8;     // coefficient lanes of the streaming modules

  // What a write on a constant bank's configuration port targets.
  typedef enum logic [2:0] {
    CFG_Q    = 3'd0,  // modulus q_m
    CFG_MU   = 3'd1,  // Barrett constant floor(2^(2W) / q_m)
    CFG_NINV = 3'd2,  // N^-1 mod q_m
    CFG_INV  = 3'd3,  // unit-specific inverse (p^-1 or q_last^-1 mod q_m)
    CFG_TWF  = 3'd4,  // forward twiddle psi^bitrev(a) mod q_m at address a
    CFG_TWI  = 3'd5   // inverse twiddle psi^-bitrev(a) mod q_m at address a
  } cfg_kind_e;

  // Element-wise ciphertext operations.
  typedef enum logic [1:0] {
    EW_PC_ADD  = 2'd0,
    EW_PC_MULT = 2'd1,
    EW_CC_ADD  = 2'd2,
    EW_CC_MULT = 2'd3
  } ew_op_e;

  // Event flags of the KeySwitch unit, one cycle each, for performance counters.
  typedef struct packed {
    logic bypass;       // former layer reused the NTT-domain input limb (i == j), no NTT run
    logic key_stall;    // accumulate beat waited for the key stream
    logic acc_wait;     // modulus-down layer waited for an accumulator limb
    logic intt1_early;  // INTT1 started while the former layer still had iterations to run
  } ks_events_t;

endpackage
