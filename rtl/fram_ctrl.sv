// fram_ctrl: read and write sequencer of the adiabatic FRAM row.
//
// The plate-line PL resonates through an LC tank. Comparators turn its peak
// into a one-cycle `pu` strobe and its trough into a `pd` strobe. This
// sequencer advances only on those strobes, so its state changes follow
// the resonance. Each of the NCOL bit-lines sits on a two-way mux: with
// PLEN it follows PL, with WREN it is clamped to `bl_d`. A bit-line only
// joins or leaves PL when it has PL's level, so every bit-line swing comes
// from the resonant plate-line.
//
// Row write, starting at event E0 with PL level X (1 at a peak, 0 at a trough):
//   E0: word-line on; columns whose new bit equals X clamp at X (group A);
//       the other enabled columns keep following PL (group B).
//   E1: PL at ~X: group A cells see BL = X against PL = ~X and are written;
//       group B has reached ~X with PL and clamps there.
//   E2: PL at X: group B cells are written; group A rejoins PL.
//   E3: PL at ~X: group B rejoins PL, word-line off, row done.
// A row write takes 1.5 resonance periods. Because E3 has the opposite level
// of E0, a following write starts with the other polarity, so the order of
// ones and zeros alternates from row to row. Columns with col_en = 0 follow
// PL all the time and their cells see no field.
//
// Read (must begin at a trough): E0 pulses `pre` to discharge the enabled
// bit-lines, turns the word-line on and leaves them floating. PL rising to
// its peak moves the cell charge onto the bit-lines. At E1 (peak) `sa_en` is
// high for that cycle, `sense_d` is captured as read data and the row is
// written back with the write sequence starting at E1, since the read is
// destructive. One request is buffered; a new operation can start on the
// same event that ends the previous one.
// PL resonance, PU/PD-clocked state machines, WREN/PLEN muxes and the
// 1.5-cycle row write with alternating order follow the document; the
// exact per-event schedule, the buffered request interface and the
// sense/write-back timing are this design's choices. `pu`/`pd` are taken as
// strobes synchronous to `clk`.
module fram_ctrl #(
  parameter int unsigned ROWS = 256,
  parameter int unsigned NCOL = 160,
  localparam int unsigned RW = $clog2(ROWS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            pu,          // PL peak strobe
  input  logic            pd,          // PL trough strobe
  // request: physical columns to write/read and their data
  input  logic            req_valid,
  output logic            req_ready,
  input  logic            req_we,
  input  logic [RW-1:0]   req_row,
  input  logic [NCOL-1:0] req_col_en,
  input  logic [NCOL-1:0] req_col_d,
  // read result
  output logic            rvalid,
  output logic [NCOL-1:0] rdata,
  // array drive
  output logic [RW-1:0]   row,
  output logic            wl,
  output logic [NCOL-1:0] plen,
  output logic [NCOL-1:0] wren,
  output logic [NCOL-1:0] bl_d,
  output logic            pre,
  output logic            sa_en,
  input  logic [NCOL-1:0] sense_d,
  output logic            busy,
  output logic            row_done     // pulse when a row write completes
);

  typedef enum logic [1:0] {S_IDLE, S_RD_FLOAT, S_WR} state_e;

  state_e          state;
  logic [1:0]      k;          // last event index of the current row write
  logic            x;          // PL level at E0
  logic [NCOL-1:0] d, en;

  logic            p_valid, p_we;
  logic [RW-1:0]   p_row;
  logic [NCOL-1:0] p_en, p_d;

  logic ev;
  assign ev        = pu | pd;
  assign req_ready = !p_valid;
  assign busy      = (state != S_IDLE) || p_valid;
  assign sa_en     = (state == S_RD_FLOAT) && pu;

  // columns clamped by WREN at event index `idx` of a row write of `dd` on
  // the enabled columns `ee` that started at PL level `xx`; every other
  // column follows PL
  function automatic logic [NCOL-1:0] clamp_set(input logic [1:0] idx, input logic xx,
                                               input logic [NCOL-1:0] dd,
                                               input logic [NCOL-1:0] ee);
    unique case (idx)
      2'd0:    return ee & ~(dd ^ {NCOL{xx}});   // group A: bit equals PL level
      2'd1:    return ee;                        // both groups
      2'd2:    return ee &  (dd ^ {NCOL{xx}});   // group B
      default: return '0;
    endcase
  endfunction

  logic start;
  assign start = p_valid && (p_we || pd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      k        <= '0;
      x        <= 1'b0;
      d        <= '0;
      en       <= '0;
      p_valid  <= 1'b0;
      p_we     <= 1'b0;
      p_row    <= '0;
      p_en     <= '0;
      p_d      <= '0;
      row      <= '0;
      wl       <= 1'b0;
      plen     <= '1;
      wren     <= '0;
      bl_d     <= '0;
      pre      <= 1'b0;
      rvalid   <= 1'b0;
      rdata    <= '0;
      row_done <= 1'b0;
    end else begin
      pre      <= 1'b0;
      rvalid   <= 1'b0;
      row_done <= 1'b0;
      if (req_valid && req_ready) begin
        p_valid <= 1'b1;
        p_we    <= req_we;
        p_row   <= req_row;
        p_en    <= req_col_en;
        p_d     <= req_col_d;
      end
      if (ev) begin
        if (state == S_RD_FLOAT) begin
          // peak after a floating read: capture and write back from here
          rdata  <= sense_d & en;
          rvalid <= 1'b1;
          d      <= sense_d & en;
          x      <= 1'b1;
          k      <= 2'd0;
          state  <= S_WR;
          wren   <= clamp_set(2'd0, 1'b1, sense_d & en, en);
          plen   <= ~clamp_set(2'd0, 1'b1, sense_d & en, en);
          bl_d <= sense_d & en;
        end else if (state == S_WR && k != 2'd2) begin
          k <= k + 2'd1;
          wren <= clamp_set(k + 2'd1, x, d, en);
          plen <= ~clamp_set(k + 2'd1, x, d, en);
        end else begin
          // idle, or event E3 ending a row write
          if (state == S_WR) row_done <= 1'b1;
          if (start) begin
            p_valid <= 1'b0;
            row     <= p_row;
            en      <= p_en;
            wl      <= 1'b1;
            if (p_we) begin
              d     <= p_d & p_en;
              x     <= pu;
              k     <= 2'd0;
              state <= S_WR;
              wren  <= clamp_set(2'd0, pu, p_d & p_en, p_en);
              plen  <= ~clamp_set(2'd0, pu, p_d & p_en, p_en);
              bl_d <= p_d & p_en;
            end else begin
              state <= S_RD_FLOAT;
              pre   <= 1'b1;
              plen  <= ~p_en;
              wren  <= '0;
            end
          end else begin
            state <= S_IDLE;
            wl    <= 1'b0;
            plen  <= '1;
            wren  <= '0;
          end
        end
      end
    end
  end

endmodule
