// sling_tpg -- SLING linear test pattern generator for built-in self-test.
//
// A k-bit register (k = 8*M) holds the generator state; every enabled clock
// it is replaced by A*state, with A the block state transition matrix built
// in sling_stm from cheap shift/XOR transformations of M-bit blocks. With the
// stored configurations A has a primitive characteristic polynomial, so any
// non-zero seed runs through all 2^k - 1 non-zero states before repeating.
// The generator is meant for "2D" operation: state bit j drives scan chain j
// directly, so no phase-shift network sits between generator and chains.
// The intermediate transformation outputs are brought out as well, as extra
// decorrelated sources for further scan chains.
//
// Interface and timing:
//   rst_n        asynchronous active-low reset, loads SEED
//   load,seed_in synchronous seed load (takes priority over en); an all-zero
//                seed is a fixed point of any linear machine and is flagged
//                by an assertion
//   en           advance one state per clock; when low the state holds
//   chains       the state, one bit per scan chain, registered
//   xf_chains    the 25 transformation outputs (Mi at [i*M +: M]),
//                combinational from the state
// MAX_XOR, MAX_DEPTH and MAX_FANOUT bound the gate count, XOR depth and
// fan-out of the configuration; elaboration stops if CFG exceeds them.
// The block structure, the transformations and 2D operation follow the
// SLING method; seed loading, enable, the reset value (a single 1, as in a
// state-evolution experiment of the method) and the control priorities are
// this design's own.
module sling_tpg
  import sling_pkg::*;
#(
  parameter int       M    = 8,
  parameter stm_cfg_t CFG  = default_cfg(M),
  localparam int      K    = NUM_BLOCKS * M,
  parameter logic [K-1:0] SEED = K'(1),
  // Design bounds on the configuration, checked at elaboration (sling_stm).
  parameter int       MAX_XOR    = default_max_xor(M),
  parameter int       MAX_DEPTH  = 2,
  parameter int       MAX_FANOUT = default_max_fanout(M)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    load,
  input  logic [K-1:0]            seed_in,
  output logic [K-1:0]            chains,
  output logic [NUM_XFORMS*M-1:0] xf_chains
);

  if (SEED == '0) begin : g_chk_seed
    $error("sling_tpg: SEED must be non-zero");
  end

  logic [K-1:0] state_q, state_d;

  sling_stm #(
    .M(M), .CFG(CFG),
    .MAX_XOR(MAX_XOR), .MAX_DEPTH(MAX_DEPTH), .MAX_FANOUT(MAX_FANOUT)
  ) u_stm (
    .state  (state_q),
    .nxt    (state_d),
    .xf_out (xf_chains)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state_q <= SEED;
    else if (load) state_q <= seed_in;
    else if (en)   state_q <= state_d;
  end

  assign chains = state_q;

  // A linear generator never leaves the all-zero state.
  a_seed_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
                                   load |-> seed_in != '0)
    else $error("sling_tpg: all-zero seed loaded");

endmodule
