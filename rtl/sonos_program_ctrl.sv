// sonos_program_ctrl: write state machine of the wide-write SONOS flash.
//
// A program writes one row of NBL bits at once. Sequence after `start`:
//   LOAD      latch row address and data;
//   STEP1..4  stepped transition of the changing bit-lines and source-lines:
//             steps 1 and 2 let the transition pump move the rising and the
//             falling rail one step each; step 3 shorts the two rails (charge
//             sharing, no pump energy); step 4 charges and discharges both
//             rails out of the same pump (charge recycling);
//   SETTLE    lines switched to their stable -3.8 V / 1 V rails, transition
//             pump disconnected, closed-loop pumps take over;
//   PROGRAM   word-line at program level for PROG_CYCLES cycles (FN
//             tunnelling, about 1 ms in the document);
//   DONE      lines back to hold, `commit` makes the row data the new
//             previous data for the bit-line selection.
// Block erase (`erase`) holds ERASE_CYCLES cycles with the erase bias.
// Every step, SETTLE and the entry into PROGRAM wait for `pump_ok`, the
// comparator output of the charge-pump regulation loops, so the next step
// only starts once the rails are stable. The four transition steps, charge
// sharing in step 3, recycling in step 4 and the wait on the comparators
// follow the document; what steps 1 and 2 do, the cycle counts and the
// interface are this design's choices.
module sonos_program_ctrl
  import sonos_pkg::*;
#(
  parameter int unsigned NBL          = 1024,
  parameter int unsigned ROWS         = 260,
  parameter int unsigned PROG_CYCLES  = 1000,  // 1 ms at a 1 MHz controller clock
  parameter int unsigned ERASE_CYCLES = 1000,
  localparam int unsigned RW = $clog2(ROWS),
  localparam int unsigned TW = $clog2(((PROG_CYCLES > ERASE_CYCLES) ? PROG_CYCLES : ERASE_CYCLES) + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,        // program row `row` with `data`
  input  logic           erase,        // block erase
  input  logic [RW-1:0]  row,
  input  logic [NBL-1:0] data,
  input  logic           pump_ok,      // charge-pump loop comparators: rails stable
  output logic           busy,
  output logic           done,         // one-cycle pulse at the end
  output logic [RW-1:0]  row_q,
  output logic [NBL-1:0] data_q,
  output phase_e         phase,        // to sonos_bl_select
  output logic           commit,
  output logic [2:0]     tp_step,      // transition step 1..4, 0 outside
  output logic           tp_en,        // transition pump connected
  output logic           rail_short,   // step 3: rising and falling rails shorted
  output logic           rail_recycle, // step 4: both rails on the same pump
  output logic           wl_prog,      // selected word-line at program bias
  output logic           wl_erase      // erase bias on the block
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_STEP, S_SETTLE, S_PROGRAM, S_DONE, S_ERASE
  } state_e;

  state_e       state;
  logic [TW-1:0] timer;

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      timer   <= '0;
      tp_step <= '0;
      row_q   <= '0;
      data_q  <= '1;
    end else begin
      unique case (state)
        S_IDLE:
          if (start) begin
            row_q  <= row;
            data_q <= data;
            state  <= S_LOAD;
          end else if (erase) begin
            timer <= '0;
            state <= S_ERASE;
          end
        S_LOAD: begin
          tp_step <= 3'd1;
          state   <= S_STEP;
        end
        S_STEP:
          if (pump_ok) begin
            if (tp_step == 3'd4) begin
              tp_step <= '0;
              state   <= S_SETTLE;
            end else tp_step <= tp_step + 3'd1;
          end
        S_SETTLE:
          if (pump_ok) begin
            timer <= '0;
            state <= S_PROGRAM;
          end
        S_PROGRAM:
          if (timer == TW'(PROG_CYCLES - 1)) state <= S_DONE;
          else timer <= timer + 1'b1;
        S_DONE:  state <= S_IDLE;
        S_ERASE:
          if (timer == TW'(ERASE_CYCLES - 1)) state <= S_IDLE;
          else timer <= timer + 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    phase        = PH_HOLD;
    tp_en        = 1'b0;
    rail_short   = 1'b0;
    rail_recycle = 1'b0;
    wl_prog      = 1'b0;
    wl_erase     = (state == S_ERASE);
    commit       = (state == S_DONE);
    done         = (state == S_DONE) || (state == S_ERASE && timer == TW'(ERASE_CYCLES - 1));
    unique case (state)
      S_STEP: begin
        phase        = PH_TRANSITION;
        tp_en        = 1'b1;
        rail_short   = (tp_step == 3'd3);
        rail_recycle = (tp_step == 3'd4);
      end
      S_SETTLE:  phase = PH_PROGRAM;
      S_PROGRAM: begin
        phase   = PH_PROGRAM;
        wl_prog = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
