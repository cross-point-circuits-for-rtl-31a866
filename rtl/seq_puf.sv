// seq_puf: sequence-dependent SRAM PUF. A challenge is a sequence of row
// pairs (a,b); for each pair both word-lines are opened at once, so in every
// column where the two cells differ the stronger cell overwrites the weaker.
// The response, read from a row at the end, depends on the initial data, on
// the length and on the order of the sequence.
//
// The controller runs commands from a small interface:
//   CMD_WRITE  write `row_a` with `wdata` (initialisation);
//   CMD_SEQ    apply pairs 0..seq_len-1 of `seq_a`/`seq_b`, in order;
//   CMD_READ   read `row_a` into `rdata` (`rdata_valid` pulses).
// Each pair takes PAIR_CYC = 4 + cfg_eq cycles: bit-lines are pre-charged and
// equalised (preb = eqb = 0), both word-lines rise while pre-charge is still
// on, preb is released after cfg_pre cycles and eqb after cfg_eq cycles
// (cfg_eq > cfg_pre), so the cells fight on released bit-lines without
// pre-charge or row bias; then the word-lines fall. Splitting eqb from preb
// and making both release points adjustable follow the document; the
// cycle-level sequencing and the command interface are this design's.
// The cell array is the behavioural model puf_array.
module seq_puf #(
  parameter int unsigned ROWS      = 64,
  parameter int unsigned COLS      = 64,
  parameter int unsigned MAXSEQ    = 4,
  parameter logic [31:0] CHIP_SEED = 32'h1234_5678,
  localparam int unsigned RW = $clog2(ROWS),
  localparam int unsigned SW = $clog2(MAXSEQ + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cmd_valid,
  input  logic [1:0]               cmd,          // 0 write, 1 sequence, 2 read
  output logic                     cmd_ready,
  input  logic [RW-1:0]            row_a,
  input  logic [COLS-1:0]          wdata,
  input  logic [SW-1:0]            seq_len,
  input  logic [MAXSEQ-1:0][RW-1:0] seq_a,
  input  logic [MAXSEQ-1:0][RW-1:0] seq_b,
  input  logic [3:0]               cfg_pre,      // preb release, cycles after WL rise
  input  logic [3:0]               cfg_eq,       // eqb release, cycles after WL rise
  output logic [COLS-1:0]          rdata,
  output logic                     rdata_valid,
  // array control, brought out for observation
  output logic [ROWS-1:0]          wl,
  output logic                     preb,
  output logic                     eqb,
  output logic                     sa_en
);

  localparam logic [1:0] CMD_WRITE = 2'd0, CMD_SEQ = 2'd1, CMD_READ = 2'd2;

  typedef enum logic [2:0] {S_IDLE, S_WRITE, S_PRE, S_FIGHT, S_READ, S_SENSE} state_e;
  state_e state;
  logic [RW-1:0]     r_q;
  logic [COLS-1:0]   d_q;
  logic [SW-1:0]     len_q, idx;
  logic [MAXSEQ-1:0][RW-1:0] a_q, b_q;
  logic [3:0]        t, pre_q, eq_q;
  logic              we;

  assign cmd_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      r_q <= '0; d_q <= '0; len_q <= '0; idx <= '0; a_q <= '0; b_q <= '0;
      t <= '0; pre_q <= '0; eq_q <= '0; rdata_valid <= 1'b0;
    end else begin
      rdata_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          r_q <= row_a; d_q <= wdata; len_q <= seq_len; a_q <= seq_a; b_q <= seq_b;
          pre_q <= cfg_pre; eq_q <= (cfg_eq > cfg_pre) ? cfg_eq : cfg_pre + 4'd1;
          idx <= '0; t <= '0;
          case (cmd)
            CMD_WRITE: state <= S_WRITE;
            CMD_SEQ:   state <= (seq_len == '0) ? S_IDLE : S_PRE;
            CMD_READ:  state <= S_READ;
            default:   state <= S_IDLE;
          endcase
        end
        S_WRITE: state <= S_IDLE;
        S_PRE: begin t <= '0; state <= S_FIGHT; end      // pre-charge, WL low
        S_FIGHT: begin
          if (t == eq_q + 4'd1) begin                    // WL falls after this cycle
            t <= '0;
            if (idx + 1'b1 == len_q) state <= S_IDLE;
            else begin idx <= idx + 1'b1; state <= S_PRE; end
          end else t <= t + 4'd1;
        end
        S_READ:  state <= S_SENSE;
        S_SENSE: begin state <= S_IDLE; rdata_valid <= 1'b1; end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    wl    = '0;
    preb  = 1'b1;
    eqb   = 1'b1;
    sa_en = 1'b0;
    we    = 1'b0;
    unique case (state)
      S_WRITE: begin wl[r_q] = 1'b1; we = 1'b1; end
      S_PRE:   begin preb = 1'b0; eqb = 1'b0; end
      S_FIGHT: begin
        wl[a_q[idx]] = 1'b1;
        wl[b_q[idx]] = 1'b1;
        preb = (t >= pre_q);
        eqb  = (t >= eq_q);
      end
      S_READ:  begin preb = 1'b0; eqb = 1'b0; end
      S_SENSE: begin wl[r_q] = 1'b1; sa_en = 1'b1; end
      default: ;
    endcase
  end

  puf_array #(.ROWS(ROWS), .COLS(COLS), .CHIP_SEED(CHIP_SEED)) u_array (
    .clk, .wl, .preb, .eqb, .we, .wdata(d_q), .sa_en, .rdata);

endmodule
