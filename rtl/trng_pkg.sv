// trng_pkg: constants and types shared by the six TRNG cores and their top.
//
// The numeric defaults below are the ones reported for the Spartan 6 implementation,
// which is used as the main configuration throughout this RTL. The values for the two
// other families are kept next to them so that a user can re-parameterise a core.
// Every timed behavioural model in this design works in picoseconds.
package trng_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  // Index of each generator in the top-level output vectors.
  typedef enum logic [2:0] {
    GEN_ERO  = 3'd0,
    GEN_COSO = 3'd1,
    GEN_MURO = 3'd2,
    GEN_PLL  = 3'd3,
    GEN_TERO = 3'd4,
    GEN_STR  = 3'd5
  } gen_e;

  localparam int unsigned NUM_GEN = 6;

  // Output pair of every generator: the raw bit stream and its strobe.
  typedef struct packed {
    logic noise;
    logic clk;
  } trng_out_t;

  // ERO-TRNG frequency division factors (Spartan 6, Cyclone V, SmartFusion 2).
  localparam int unsigned ERO_K_SPARTAN6 = 80000;
  localparam int unsigned ERO_K_CYCLONE5 = 135000;
  localparam int unsigned ERO_K_SMARTF2  = 20000;

  // PLL-TRNG: number of reference-clock samples XORed into one output bit
  // (larger of the two "total" factors of the PLL parameter table).
  localparam int unsigned PLL_KD_SPARTAN6 = 1377;
  localparam int unsigned PLL_KD_CYCLONE5 = 667;
  localparam int unsigned PLL_KD_SMARTF2  = 729;

  // Gaussian-like random number (mean 0, standard deviation 1) from the sum of
  // twelve uniform variates; used by the behavioural oscillator models.
  function automatic real gauss();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom) / 4294967296.0;
    return s - 6.0;
  endfunction

endpackage
