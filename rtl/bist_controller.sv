// bist_controller: sequencer of at-speed scan-based logic BIST with
// launch-on-capture (LOC) clocking.
//
// After `start` it runs NUM_TV+1 shift phases of SCAN_LEN cycles (SE=1). The
// first only loads vector 0; shift phase v (v >= 1) unloads the response of
// vector v-1 into the MISR while loading vector v. After each of the first
// NUM_TV shift phases it gives the two at-speed pulses with SE=0: T1 launches
// the stimulus and T2 captures the response. It then stays in DONE until the
// next `start`.
//
// Outputs, all decoded from the registered state:
//   init       pulse with the accepted start: PRPG reload, MISR and counter clear
//   se         scan enable, 0 only in the T1 and T2 cycles
//   sclk_en    enable of the scan clock SCLK (shift, T1 and T2 cycles)
//   prpg_en    PRPG advance, every shift cycle
//   unload     a captured response is on the scan outputs: MISR enable
//   slice_inc  advance the partial-mask slice counter (= unload)
//   vec_inc    advance the full-mask vector counter (last slice of a response)
//   launch, capture  the T1 and T2 cycles;  done  test finished
// One full test takes (NUM_TV+1)*SCAN_LEN + 2*NUM_TV cycles from start to done.
// Shift, launch and capture take one clock each and SE changes with no idle
// cycle; the scheme shows the waveform but not these cycle counts, so they are
// this design's choice. The MISR and counters are cleared at start; the
// signature is read, not compared, by the outside.
module bist_controller
  import cps_bist_pkg::*;
#(
  parameter int unsigned SCAN_LEN = 3,
  parameter int unsigned NUM_TV   = 50000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic init,
  output logic se,
  output logic sclk_en,
  output logic prpg_en,
  output logic unload,
  output logic slice_inc,
  output logic vec_inc,
  output logic launch,
  output logic capture,
  output logic done
);

  localparam int unsigned SW = clog2_min1(longint'(SCAN_LEN));
  localparam int unsigned PW = clog2_min1(longint'(NUM_TV) + 1);

  bist_state_e     state;
  logic [SW-1:0]   shift_cnt;
  logic [PW-1:0]   phase;      // shift phase: 0 = load only, v = unload vector v-1
  logic            last_shift;

  assign last_shift = (shift_cnt == SW'(SCAN_LEN - 1));
  assign init       = start && (state == ST_IDLE || state == ST_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      shift_cnt <= '0;
      phase     <= '0;
    end else begin
      unique case (state)
        ST_IDLE, ST_DONE: if (start) begin
          state     <= ST_SHIFT;
          shift_cnt <= '0;
          phase     <= '0;
        end
        ST_SHIFT: begin
          if (last_shift) begin
            shift_cnt <= '0;
            state     <= (phase == PW'(NUM_TV)) ? ST_DONE : ST_LAUNCH;
          end else begin
            shift_cnt <= shift_cnt + 1'b1;
          end
        end
        ST_LAUNCH:  state <= ST_CAPTURE;
        ST_CAPTURE: begin
          state <= ST_SHIFT;
          phase <= phase + 1'b1;
        end
        default:    state <= ST_IDLE;
      endcase
    end
  end

  assign launch    = (state == ST_LAUNCH);
  assign capture   = (state == ST_CAPTURE);
  assign se        = !(launch || capture);
  assign sclk_en   = (state == ST_SHIFT) || launch || capture;
  assign prpg_en   = (state == ST_SHIFT);
  assign unload    = (state == ST_SHIFT) && (phase != '0);
  assign slice_inc = unload;
  assign vec_inc   = unload && last_shift;
  assign done      = (state == ST_DONE);

  // LOC rule: the launch pulse is always followed directly by the capture pulse.
  a_loc_pair: assert property (@(posedge clk) disable iff (!rst_n) launch |=> capture);

endmodule
