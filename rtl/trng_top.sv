// trng_top: the six FPGA TRNG cores side by side, each with its own noise sources and its
// own output multiplexer.
//
// Every generator is a free-running source of randomness (ring oscillators, PLLs, a TERO
// cell or a self-timed ring, all behavioural models here) followed by a small digital
// harvester (synthesizable). Each one has its own pair of output pins, raw bit stream and
// strobe, meant for two differential output links to an external acquisition board; an
// output multiplexer per generator replaces both pins by static_in while out_en is low,
// leaving the generator running. No clock enters from outside: every clock is made by a
// ring oscillator inside.
//
//   ERO  : RO1 sampled on RO2 divided by K (17-bit counter)
//   COSO : RO1 sampled on RO2 of almost equal period; parity of the beat period
//   MURO : M rings sampled and XORed on a divided reference ring
//   PLL  : ring -> two PLLs; clk_jit sampled on clk_ref and XORed over KD samples
//   TERO : TERO cell restarted by a 7-bit counter on a ring; parity of the oscillations
//   STR  : L-stage self-timed ring sampled and XORed on a ring clock
//
// Interface: rst_n (asynchronous, active low, resets the counters of the digital parts),
// out_en[g] and pins[g] per generator g (index trng_pkg::gen_e), static_in. Each pins[g]
// carries {noise, clk}; see each core for when noise changes relative to its clk.
// Parameters are those of the Spartan 6 implementations; oscillator periods follow the
// reported clock periods and bit rates, and where none is reported the choice is noted
// next to the parameter.
module trng_top #(
  // ERO-TRNG
  parameter int unsigned ERO_K          = trng_pkg::ERO_K_SPARTAN6,
  parameter int unsigned ERO_WIDTH      = 17,      // divider width; 18 for K = 135 000
  parameter int unsigned ERO_N          = 3,       // NAND + 2 buffers
  parameter real         ERO_STAGE_PS   = 500.0,   // ~3 ns period
  parameter real         ERO_JITTER_PS  = 4.0,
  // COSO-TRNG
  parameter int unsigned COSO_N         = 8,
  parameter real         COSO_T1_PS     = 6920.0,
  parameter real         COSO_DT_PS     = 26.0,    // gives the reported ~0.54 Mbit/s
  parameter real         COSO_JITTER_PS = 4.0,
  // MURO-TRNG
  parameter int unsigned MURO_M         = 114,
  parameter int unsigned MURO_K         = 117,
  parameter int unsigned MURO_N         = 3,
  parameter real         MURO_STAGE_PS  = 500.0,
  parameter real         MURO_SPREAD_PS = 0.37,    // stage-delay step between rings
  // PLL-TRNG
  parameter int unsigned PLL_RO_N       = 5,
  parameter real         PLL_RO_STAGE_PS = 500.0,  // ~200 MHz input clock
  parameter int unsigned PLL1_KM        = 37,
  parameter int unsigned PLL1_KD        = 81,
  parameter int unsigned PLL2_KM        = 17,
  parameter int unsigned PLL2_KD        = 7,
  parameter int unsigned PLL_KD         = trng_pkg::PLL_KD_SPARTAN6,
  // TERO-TRNG
  parameter int unsigned TERO_RO_N      = 5,
  parameter real         TERO_RO_STAGE_PS = 1250.0, // 80 MHz: 0.625 Mbit/s * 128
  // STR-TRNG
  parameter int unsigned STR_L          = 255,
  parameter int unsigned STR_E          = 128,
  parameter real         STR_STAGE_PS   = 800.0,
  parameter int unsigned STR_RO_N       = 13,
  parameter real         STR_RO_STAGE_PS = 249.75  // 154 MHz sampling clock
) (
  input  logic                rst_n,
  input  logic                static_in,
  input  logic [5:0]          out_en,
  output trng_pkg::trng_out_t pins [6]
);
  timeunit 1ps;
  timeprecision 1fs;

  import trng_pkg::*;

  localparam logic ONE = 1'b1;   // enable input of every ring oscillator

  trng_out_t gen [6];

  // ---------------------------------------------------------------- ERO-TRNG
  logic ero_ro1, ero_ro2;

  ring_osc #(.N(ERO_N), .STAGE_DELAY_PS(ERO_STAGE_PS), .JITTER_PS(ERO_JITTER_PS))
    u_ero_ro1 (.en(ONE), .out(ero_ro1));
  ring_osc #(.N(ERO_N), .STAGE_DELAY_PS(ERO_STAGE_PS), .JITTER_PS(ERO_JITTER_PS))
    u_ero_ro2 (.en(ONE), .out(ero_ro2));

  ero_trng #(.K(ERO_K), .WIDTH(ERO_WIDTH)) u_ero (
    .ro1(ero_ro1), .ro2(ero_ro2), .rst_n(rst_n),
    .noise(gen[GEN_ERO].noise), .clk_o(gen[GEN_ERO].clk)
  );

  // ---------------------------------------------------------------- COSO-TRNG
  logic coso_s1, coso_s2;

  ring_osc #(.N(COSO_N), .STAGE_DELAY_PS(COSO_T1_PS / (2.0 * COSO_N)),
             .JITTER_PS(COSO_JITTER_PS))
    u_coso_ro1 (.en(ONE), .out(coso_s1));
  ring_osc #(.N(COSO_N), .STAGE_DELAY_PS((COSO_T1_PS + COSO_DT_PS) / (2.0 * COSO_N)),
             .JITTER_PS(COSO_JITTER_PS))
    u_coso_ro2 (.en(ONE), .out(coso_s2));

  coso_trng u_coso (
    .s1(coso_s1), .s2(coso_s2), .rst_n(rst_n),
    .noise(gen[GEN_COSO].noise), .clk_o(gen[GEN_COSO].clk)
  );

  // ---------------------------------------------------------------- MURO-TRNG
  logic [MURO_M-1:0] muro_ro;
  logic              muro_ro_r;

  for (genvar i = 0; i < MURO_M; i++) begin : g_muro_ro
    ring_osc #(.N(MURO_N), .STAGE_DELAY_PS(MURO_STAGE_PS + MURO_SPREAD_PS * i),
               .JITTER_PS(ERO_JITTER_PS))
      u_ro (.en(ONE), .out(muro_ro[i]));
  end
  ring_osc #(.N(MURO_N), .STAGE_DELAY_PS(MURO_STAGE_PS), .JITTER_PS(ERO_JITTER_PS))
    u_muro_ro_r (.en(ONE), .out(muro_ro_r));

  muro_trng #(.M(MURO_M), .K(MURO_K)) u_muro (
    .ro(muro_ro), .ro_r(muro_ro_r), .rst_n(rst_n),
    .noise(gen[GEN_MURO].noise), .clk_o(gen[GEN_MURO].clk)
  );

  // ---------------------------------------------------------------- PLL-TRNG
  logic pll_clk_in, pll_clk_jit, pll_clk_ref, pll1_locked, pll2_locked;

  ring_osc #(.N(PLL_RO_N), .STAGE_DELAY_PS(PLL_RO_STAGE_PS), .JITTER_PS(ERO_JITTER_PS))
    u_pll_ro (.en(ONE), .out(pll_clk_in));
  pll_model #(.KM(PLL1_KM), .KD(PLL1_KD)) u_pll1 (
    .clk_in(pll_clk_in), .clk_out(pll_clk_jit), .locked(pll1_locked));
  pll_model #(.KM(PLL2_KM), .KD(PLL2_KD)) u_pll2 (
    .clk_in(pll_clk_in), .clk_out(pll_clk_ref), .locked(pll2_locked));

  pll_trng #(.KD(PLL_KD)) u_pll (
    .clk_jit(pll_clk_jit), .clk_ref(pll_clk_ref), .rst_n(rst_n && pll1_locked && pll2_locked),
    .noise(gen[GEN_PLL].noise), .clk_o(gen[GEN_PLL].clk)
  );

  // ---------------------------------------------------------------- TERO-TRNG
  logic tero_ro, tero_ctrl, tero_osc;

  ring_osc #(.N(TERO_RO_N), .STAGE_DELAY_PS(TERO_RO_STAGE_PS), .JITTER_PS(ERO_JITTER_PS))
    u_tero_ro (.en(ONE), .out(tero_ro));
  tero_cell u_tero_cell (.ctrl(tero_ctrl), .out(tero_osc));

  tero_trng u_tero (
    .ro_clk(tero_ro), .tero_osc(tero_osc), .rst_n(rst_n), .ctrl(tero_ctrl),
    .noise(gen[GEN_TERO].noise), .clk_o(gen[GEN_TERO].clk)
  );

  // ---------------------------------------------------------------- STR-TRNG
  logic [STR_L-1:0] str_c;
  logic             str_ro;

  str_ring #(.L(STR_L), .E(STR_E), .STAGE_DELAY_PS(STR_STAGE_PS)) u_str_ring (.c(str_c));
  ring_osc #(.N(STR_RO_N), .STAGE_DELAY_PS(STR_RO_STAGE_PS), .JITTER_PS(ERO_JITTER_PS))
    u_str_ro (.en(ONE), .out(str_ro));

  str_trng #(.L(STR_L)) u_str (
    .clk(str_ro), .c(str_c),
    .noise(gen[GEN_STR].noise), .clk_o(gen[GEN_STR].clk)
  );

  // ---------------------------------------------------------------- output multiplexers
  for (genvar g = 0; g < NUM_GEN; g++) begin : g_mux
    output_mux u_mux (.en(out_en[g]), .static_in(static_in), .gen(gen[g]), .pins(pins[g]));
  end

endmodule
