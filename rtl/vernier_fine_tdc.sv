`timescale 1ps / 1fs
// vernier_fine_tdc: the 6.25 ps section of a channel (START to STOP2, the
// time of arrival), built as a 2D Vernier of two rings.  Digital part only.
//
// START enables the slow ring (56.25 ps cells), STOP2 the fast ring (50 ps
// cells).  At STOP2 the slow ring's state and revolution count are sampled:
// that gives C, the number of slow cell delays elapsed, and leaves a residue
// r in [0, 56.25) ps since the last slow transition.  Each fast transition
// then lands 6.25 ps earlier relative to the slow grid (50 = 56.25 - 6.25),
// so the residue shrinks by 6.25 ps per fast step until a fast transition
// arrives before the next slow one.  Every fast-ring output edge (rising and
// falling of each cell: 2*N_CELLS banks) samples the slow ring's state; the
// first fast step j at which the slow phase has not advanced gives
// f = j - 1 = floor(r / 6.25 ps).  Result = FINE_STEPS*C + f in 6.25 ps
// units, with C = 16*revolutions + phase - starting phase of the slow ring.
// Fast step j lands in bank (fast starting phase + j) mod 2N, which removes
// the fast ring's starting phase.
//
// The section is done FINE_STEPS fast steps (450 ps) after STOP2, and both
// rings stop.  If the slow counter would pass its maximum first, or STOP2
// came before START, `ovf` is set and the section is done.  `clr` clears
// everything and must be high while the rings are preset.
//
// The two rings, the 50/56.25 ps cells and the 6.25 ps step follow the
// design; the bank arrangement, the step search and the counter widths are
// this design's own reading of the 2D Vernier principle.
module vernier_fine_tdc #(
  parameter int N_CELLS    = tdc_pkg::N_CELLS,
  parameter int REV_BITS   = tdc_pkg::REV_BITS,
  parameter int FINE_STEPS = tdc_pkg::FINE_STEPS,
  localparam int NPH       = 2 * N_CELLS,
  localparam int PH_W      = $clog2(NPH),
  localparam int C_W       = REV_BITS + PH_W,
  localparam int CODE_W    = C_W + $clog2(FINE_STEPS)
) (
  input  logic                clr,
  input  logic                start,
  input  logic                stop,
  input  logic [N_CELLS-1:0]  slow_state,
  input  logic [N_CELLS-1:0]  fast_state,
  input  logic [PH_W-1:0]     ph0_slow,
  input  logic [PH_W-1:0]     ph0_fast,
  output logic                slow_en,
  output logic                fast_en,
  output logic                done,
  output logic                ovf,
  output logic                state_err,
  output logic [CODE_W-1:0]   code
);
  logic                start_seen;
  logic                ovf_raw;
  logic                stop_seen;
  logic [REV_BITS-1:0] rev;
  logic [REV_BITS-1:0] s0_rev;
  logic [N_CELLS-1:0]  s0_state;
  logic [N_CELLS-1:0]  bank_state [NPH];
  logic [NPH-1:0]      bank_valid;
  logic [PH_W-1:0]     bank_phase [NPH];
  logic [NPH-1:0]      bank_legal;
  logic [PH_W-1:0]     s0_phase;
  logic                s0_legal;
  logic                fine_done;

  always_ff @(posedge start or posedge clr) begin
    if (clr) start_seen <= 1'b0;
    else     start_seen <= 1'b1;
  end

  // slow ring revolution counter
  always_ff @(negedge slow_state[N_CELLS-1] or posedge clr) begin
    if (clr) begin
      rev     <= '0;
      ovf_raw <= 1'b0;
    end else if (rev == '1) begin
      ovf_raw <= 1'b1;
    end else begin
      rev <= rev + 1'b1;
    end
  end

  // STOP2: sample the slow ring (fast step 0) and release the fast ring
  always_ff @(posedge stop or posedge clr) begin
    if (clr) begin
      stop_seen <= 1'b0;
      s0_rev    <= '0;
      s0_state  <= '0;
    end else if (start_seen && !stop_seen && !ovf) begin
      stop_seen <= 1'b1;
      s0_rev    <= rev;
      s0_state  <= slow_state;
    end
  end

  // state-sampling banks: bank q is clocked by the fast ring entering phase
  // q, i.e. the rising edge of cell q-1 (q = 1..N) or the falling edge of
  // cell q-1-N (q = N+1..2N, bank 0 for q = 2N)
  for (genvar q = 0; q < NPH; q++) begin : g_bank
    localparam int CELL = (q + NPH - 1) % N_CELLS;
    localparam bit RISE = (q >= 1) && (q <= N_CELLS);
    logic               bclk;
    logic               v;
    logic [N_CELLS-1:0] st;
    assign bclk = RISE ? fast_state[CELL] : ~fast_state[CELL];
    always_ff @(posedge bclk or posedge clr) begin
      if (clr) begin
        v  <= 1'b0;
        st <= '0;
      end else if (!v) begin
        v  <= 1'b1;
        st <= slow_state;
      end
    end
    assign bank_valid[q] = v;
    assign bank_state[q] = st;
  end

  johnson_decoder #(.N_CELLS(N_CELLS)) u_dec_s0 (
    .state(s0_state), .phase(s0_phase), .legal(s0_legal)
  );
  for (genvar q = 0; q < NPH; q++) begin : g_dec
    johnson_decoder #(.N_CELLS(N_CELLS)) u_dec (
      .state(bank_state[q]), .phase(bank_phase[q]), .legal(bank_legal[q])
    );
  end

  // bank holding fast step j
  function automatic int step_bank(input logic [PH_W-1:0] ph0, input int j);
    return (int'(ph0) + j) % NPH;
  endfunction

  assign fine_done = bank_valid[step_bank(ph0_fast, FINE_STEPS)];

  logic [C_W-1:0]    c_code;
  logic [CODE_W-1:0] f_code;
  logic              steps_legal;

  always_comb begin
    logic [PH_W-1:0] prev;
    logic            found;
    f_code      = CODE_W'(FINE_STEPS - 1);
    found       = 1'b0;
    steps_legal = s0_legal;
    prev        = s0_phase;
    for (int j = 1; j <= FINE_STEPS; j++) begin
      steps_legal = steps_legal && bank_legal[step_bank(ph0_fast, j)];
      if (!found && bank_phase[step_bank(ph0_fast, j)] == prev) begin
        found  = 1'b1;
        f_code = CODE_W'(j - 1);
      end
      prev = bank_phase[step_bank(ph0_fast, j)];
    end
    c_code = {s0_rev, s0_phase} - C_W'(ph0_slow);
  end

  // once STOP2 has sampled the slow ring, a counter wrap no longer matters:
  // the banks only need its phase
  assign ovf       = ovf_raw && !stop_seen;
  assign slow_en   = start_seen && !fine_done && !ovf;
  assign fast_en   = stop_seen  && !fine_done && !ovf;
  assign done      = (stop_seen && fine_done) || ovf;
  assign state_err = stop_seen && fine_done && !steps_legal;
  assign code      = CODE_W'(FINE_STEPS) * CODE_W'(c_code) + f_code;
endmodule
