// Test-per-scan BIST controller.
//
// Sequences one test run of NUM_PATTERNS patterns through an N-bit scan
// chain. After 'start' it loads the first modified pattern into the scan-in
// register (LOAD), then repeats: N shift clocks with scan_en high (SHIFT), one
// capture clock with scan_en low in which the circuit under test captures its
// response (CAPTURE). Each capture clock also steps the LFSR and loads the next
// modified pattern, so shifting the next pattern in shifts the previous
// response out. After the last capture, N more shift clocks (UNLOAD) empty the
// chain into the response analyzer, then 'done' is held until the next start.
// Scan/capture cycles as such follow the document; the state machine, the
// run length and the start/done handshake are this design's choices.
//
// Timing: from the clock that samples start to the first clock with done high
// there are 1 + NUM_PATTERNS*(N+1) + N clocks. ra_en is high on shift clocks
// that move a captured response (not on the first pattern's shift-in).
// lfsr_init holds the LFSR at its seed while idle or done; ra_clear clears the
// signature when a run starts.
module bist_ctrl
  import bi_tpg_pkg::*;
#(
  parameter int unsigned N            = DEFAULT_SCAN_LEN,
  parameter int unsigned NUM_PATTERNS = 63
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        lfsr_init,
  output logic        lfsr_en,
  output logic        reg_load,
  output logic        reg_shift,
  output logic        scan_en,
  output logic        ra_clear,
  output logic        ra_en,
  output logic        busy,
  output logic        done,
  output bist_state_t state
);

  localparam int unsigned BW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned PW = $clog2(NUM_PATTERNS + 1);

  logic [BW-1:0] bit_cnt;
  logic [PW-1:0] pat_cnt;   // patterns captured since start
  bist_state_t   state_n;
  logic          last_bit;
  logic          last_pat;

  assign last_bit = (bit_cnt == BW'(N - 1));
  assign last_pat = (pat_cnt == PW'(NUM_PATTERNS - 1));

  always_comb begin
    state_n = state;
    unique case (state)
      ST_IDLE, ST_DONE: if (start)    state_n = ST_LOAD;
      ST_LOAD:                        state_n = ST_SHIFT;
      ST_SHIFT:         if (last_bit) state_n = ST_CAPTURE;
      ST_CAPTURE:                     state_n = last_pat ? ST_UNLOAD : ST_SHIFT;
      ST_UNLOAD:        if (last_bit) state_n = ST_DONE;
      default:                        state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      bit_cnt <= '0;
      pat_cnt <= '0;
    end else begin
      state <= state_n;
      if (state == ST_SHIFT || state == ST_UNLOAD)
        bit_cnt <= last_bit ? '0 : bit_cnt + 1'b1;
      else
        bit_cnt <= '0;
      if (state == ST_LOAD)
        pat_cnt <= '0;
      else if (state == ST_CAPTURE)
        pat_cnt <= pat_cnt + 1'b1;
    end
  end

  always_comb begin
    lfsr_init = (state == ST_IDLE) || (state == ST_DONE);
    lfsr_en   = (state == ST_LOAD) || (state == ST_CAPTURE && !last_pat);
    reg_load  = lfsr_en;
    reg_shift = (state == ST_SHIFT) || (state == ST_UNLOAD);
    scan_en   = reg_shift;
    ra_clear  = start && ((state == ST_IDLE) || (state == ST_DONE));
    ra_en     = (state == ST_UNLOAD) || (state == ST_SHIFT && pat_cnt != '0);
    busy      = !((state == ST_IDLE) || (state == ST_DONE));
    done      = (state == ST_DONE);
  end

  initial begin
    assert (NUM_PATTERNS >= 1) else $error("bist_ctrl: NUM_PATTERNS must be at least 1");
  end

  // scan_en must be low for exactly one clock between two shift phases
  property p_capture_one_clock;
    @(posedge clk) disable iff (!rst_n) (state == ST_CAPTURE) |=> scan_en;
  endproperty
  assert property (p_capture_one_clock);

endmodule
