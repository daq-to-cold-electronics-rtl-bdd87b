// trigger_master: hardware trigger unit of the timing master.
//
// It (a) tracks the in-spill period between the accelerator's spill_start and
// spill_end strobes; (b) accepts beam-line triggers during the spill and
// vetoes one that follows the previous beam trigger by fewer than veto_cycles
// clock cycles (pile-up); (c) generates a calibration trigger every
// calib_period cycles outside the spill when calib_en is set; (d) lets a
// trigger through only while the software-enable-trigger (SET) is asserted and
// no backpressure exists; (e) hands the trigger to the command-word builder,
// which sends at most one trigger per 500 ns word.
//
// Backpressure, "SET deasserted as a data throttle", combines two of the
// schemes discussed for the system: the OR of the RCE busy lines, and a
// credit count of triggers sent minus events the RCEs report as shipped
// (evt_done), compared with max_outstanding. set_eff is the resulting
// effective SET. A trigger that is accepted while the previous one still
// waits for a word is counted as lost.
//
// Triggers carry a 2-bit partition number: beam triggers go to beam_part,
// calibration triggers to calib_part. All behaviour is from the description
// of the unit; the cycle-level rules, the timer widths and the counters are
// this design's choices.
module trigger_master #(
  parameter int unsigned NBUSY = 8      // one busy line per COB
) (
  input  logic             clk,
  input  logic             rst,
  // accelerator and beam line
  input  logic             spill_start,
  input  logic             spill_end,
  input  logic             beam_trig,
  // software configuration
  input  logic             set_enable,
  input  logic             calib_en,
  input  logic [15:0]      veto_cycles,
  input  logic [23:0]      calib_period,
  input  logic [15:0]      max_outstanding,
  input  logic [1:0]       beam_part,
  input  logic [1:0]       calib_part,
  // backpressure
  input  logic [NBUSY-1:0] busy_in,
  input  logic             evt_done,
  // to the command-word builder
  input  logic             word_load,     // a command word is being loaded
  output logic             trig_pending,
  output logic             trig_calib,
  output logic [1:0]       trig_part,
  // status
  output logic             in_spill,
  output logic             set_eff,
  output logic [15:0]      outstanding,
  output logic [31:0]      n_sent,
  output logic [31:0]      n_vetoed,
  output logic [31:0]      n_inhibited,
  output logic [31:0]      n_lost,
  output logic [31:0]      n_calib
);
  logic [15:0] since_beam;
  logic        seen_beam;
  logic [23:0] cal_timer;
  logic        beam_ok, cal_fire, cand, cand_calib, sent;

  assign set_eff  = set_enable && !(|busy_in) && (outstanding < max_outstanding);
  assign beam_ok  = beam_trig && in_spill && !(seen_beam && since_beam < veto_cycles);
  assign cal_fire = calib_en && !in_spill && (cal_timer == 24'd1);
  assign cand       = beam_ok || cal_fire;
  assign cand_calib = !beam_ok;
  assign sent       = word_load && trig_pending;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_spill <= 1'b0; since_beam <= '0; seen_beam <= 1'b0;
      cal_timer <= '0;
      trig_pending <= 1'b0; trig_calib <= 1'b0; trig_part <= '0;
      outstanding <= '0;
      n_sent <= '0; n_vetoed <= '0; n_inhibited <= '0; n_lost <= '0; n_calib <= '0;
    end else begin
      // spill state
      if (spill_start)    in_spill <= 1'b1;
      else if (spill_end) in_spill <= 1'b0;
      // pile-up timer
      if (beam_trig) begin
        since_beam <= '0;
        seen_beam  <= 1'b1;
      end else if (since_beam != 16'hFFFF) begin
        since_beam <= since_beam + 16'd1;
      end
      if (beam_trig && in_spill && !beam_ok) n_vetoed <= n_vetoed + 32'd1;
      // calibration timer, runs outside the spill only
      if (!calib_en || in_spill || cal_timer == 24'd1 || cal_timer == 24'd0)
        cal_timer <= calib_period;
      else
        cal_timer <= cal_timer - 24'd1;
      // hand-off to the command word
      if (sent) begin
        trig_pending <= 1'b0;
        n_sent       <= n_sent + 32'd1;
        if (trig_calib) n_calib <= n_calib + 32'd1;
      end
      if (cand) begin
        if (!set_eff) begin
          n_inhibited <= n_inhibited + 32'd1;
        end else if (trig_pending && !sent) begin
          n_lost <= n_lost + 32'd1;
        end else begin
          trig_pending <= 1'b1;
          trig_calib   <= cand_calib;
          trig_part    <= cand_calib ? calib_part : beam_part;
        end
      end
      // credit count
      case ({sent, evt_done && outstanding != 0})
        2'b10:   outstanding <= outstanding + 16'd1;
        2'b01:   outstanding <= outstanding - 16'd1;
        default: ;
      endcase
    end
  end
endmodule
