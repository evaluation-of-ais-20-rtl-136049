// str_ring: behavioural model of a self-timed ring (not synthesizable logic).
//
// L stages in a loop, each a Muller C-element followed by an inverter on its reverse
// path: stage i copies its forward input C(i-1) when that differs from its reverse input
// C(i+1), and holds otherwise (two-phase handshake). Stage i holds an event (token) when
// C(i) differs from C(i+1); a token moves forward when the stage ahead is empty, so the
// E tokens circulate without colliding. The ring starts with E tokens spread as evenly as
// L allows; E must be even. Each firing takes STAGE_DELAY_PS plus Gaussian jitter of
// standard deviation JITTER_PS. The Charlie and drafting effects that settle a real ring
// into its steady mode are not modelled: the model starts in the evenly-spaced mode.
//
// Interface: c (the L stage outputs C1..CL, bit i = stage i+1). Timing in picoseconds.
// For simulation speed the L stages are evaluated by a single event-list process
// rather than by L processes; the behaviour is the same.
// L, E and the delays are this model's choices: the document prints none of them.
module str_ring #(
  parameter int unsigned L              = 255,
  parameter int unsigned E              = 128,
  parameter real         STAGE_DELAY_PS = 800.0,
  parameter real         JITTER_PS      = 2.0
) (
  output logic [L-1:0] c
);
  timeunit 1ps;
  timeprecision 1fs;

  import trng_pkg::gauss;

  // Initial stage values: token k sits at stage floor(k*L/E).
  function automatic logic [L-1:0] init_state();
    logic [L-1:0] s;
    int unsigned  k;
    logic         v;
    s = '0;
    v = 1'b0;
    k = 0;
    for (int unsigned i = 0; i < L; i++) begin
      s[i] = v;
      if (k < E && (k * L) / E == i) begin
        v = ~v;
        k++;
      end
    end
    return s;
  endfunction

  localparam logic [L-1:0] INIT = init_state();

  // All stages are simulated by one process holding the firing time of every enabled
  // stage: it advances to the earliest one, updates that stage and arms the two
  // neighbours if the handshake now enables them. A stage, once enabled, stays enabled
  // until it fires (neither neighbour can change meanwhile), so this is exactly the
  // behaviour of L independent C-elements with transport delays.
  logic [L-1:0] cs;
  real          t_fire [L];
  bit           armed  [L];

  assign c = cs;

  function automatic bit enabled(int unsigned i);
    return cs[(i + L - 1) % L] != cs[i] && cs[(i + 1) % L] == cs[i];
  endfunction

  task automatic arm(int unsigned i);
    if (!armed[i] && enabled(i)) begin
      armed[i]  = 1'b1;
      t_fire[i] = $realtime + STAGE_DELAY_PS + JITTER_PS * gauss();
    end
  endtask

  bit          started = 1'b0;
  int unsigned nxt;
  real         t_min;

  always begin
    if (!started) begin
      cs = INIT;
      for (int unsigned i = 0; i < L; i++) begin
        armed[i] = 1'b0;
        arm(i);
      end
      started = 1'b1;
    end
    t_min = 0.0;
    nxt   = L;
    for (int unsigned i = 0; i < L; i++)
      if (armed[i] && (nxt == L || t_fire[i] < t_min)) begin
        nxt   = i;
        t_min = t_fire[i];
      end
    if (nxt == L) begin
      // Cannot happen with 0 < E < L; kept so that the process never spins.
      #(STAGE_DELAY_PS);
    end else begin
      if (t_min > $realtime) #(t_min - $realtime);
      cs[nxt]    = cs[(nxt + L - 1) % L];
      armed[nxt] = 1'b0;
      arm((nxt + L - 1) % L);
      arm((nxt + 1) % L);
    end
  end

  initial begin
    assert (E % 2 == 0 && E > 0 && E < L) else $error("str_ring: E must be even and below L");
  end

endmodule
