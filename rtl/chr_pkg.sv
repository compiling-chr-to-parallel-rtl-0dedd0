// Shared constraint encodings for the CHR-to-hardware executors.
// Every constraint is a packed struct whose most significant bit is its
// valid signal; a removed constraint keeps its value and drops valid. The
// generic switches and buffers only look at that MSB, so they are written
// against a plain CW-bit vector and each program uses its own struct.
// Widths: gcd values are 2 bytes and gcd-matrix values 1 byte, as in the
// measurements these executors reproduce; the other widths are chosen here.
package chr_pkg;
  localparam int GCD_W   = 16;  // gcd values (2-byte integers)
  localparam int PRIME_W = 16;  // prime sieve values
  localparam int MS_W    = 16;  // merge-sort values and chain lengths
  localparam int GM_W    = 8;   // gcd-matrix values (1-byte constraints)
  localparam int IV_W    = 16;  // interval bounds
  localparam int IDX_W   = 8;   // matrix positions and variable indexes

  // gcd(N) and prime(N)
  typedef struct packed { logic valid; logic [GCD_W-1:0] n; } gcd_c_t;
  typedef struct packed { logic valid; logic [PRIME_W-1:0] n; } prime_c_t;

  // Flattened merge sort c(Kind, X, Y): kind 0 = arc(X,Y), kind 1 = seq(X,Y)
  typedef enum logic { MS_ARC = 1'b0, MS_SEQ = 1'b1 } ms_kind_e;
  typedef struct packed {
    logic          valid;
    ms_kind_e      kind;
    logic [MS_W-1:0] x;
    logic [MS_W-1:0] y;
  } ms_c_t;

  // gcd(X, Y, N) of the gcd-matrix program
  typedef struct packed {
    logic             valid;
    logic [IDX_W-1:0] x;
    logic [IDX_W-1:0] y;
    logic [GM_W-1:0]  n;
  } gm_c_t;

  // V :: Lo : Hi of the interval domain solver (V is a variable index)
  typedef struct packed {
    logic             valid;
    logic [IDX_W-1:0] v;
    logic [IV_W-1:0]  lo;
    logic [IV_W-1:0]  hi;
  } iv_c_t;

  // Round-robin switch states
  typedef enum logic [2:0] {
    CS_IDLE, CS_LOAD, CS_WAIT, CS_XFER, CS_DONE
  } cs_state_e;

  // Shift-register (strong parallelism) switch states
  typedef enum logic [2:0] {
    SP_IDLE, SP_SEEK, SP_LOAD, SP_WAIT, SP_DONE
  } sp_state_e;

  // Merge-sort rule selector for rhb_msort
  typedef enum logic { RULE_M0 = 1'b0, RULE_M1 = 1'b1 } ms_rule_e;

  // Accelerator host-interface states
  typedef enum logic [1:0] { H_LOAD, H_RUN, H_UNLOAD } host_state_e;

  // Massive-parallelism executor states
  typedef enum logic [1:0] { MP_IDLE, MP_RUN, MP_DONE } mp_state_e;
endpackage
