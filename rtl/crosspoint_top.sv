// crosspoint_top: the cross-point circuits of this library side by side.
//
// Five independent designs share only clock and reset; each keeps its own
// ports, prefixed:
//   hr_  Hi-Rise 64x64, 4-layer, 128-bit switch with CLRG arbitration;
//   cm_  64x64 configurable memory (SRAM / BCAM / TCAM / logic-in-memory);
//   pf_  sequence-dependent SRAM PUF (behavioural cell array inside);
//   sn_  wide-write SONOS flash digital path: program sequencer, bit-line
//        rail selection, 16:1 read mux with reference-current sensing;
//   fr_  adiabatic FRAM row sequencer with 2:1 column mux / reconfigurable
//        sense amplifiers.
// The only logic of its own is the FRAM word interface: a word address of
// FR_AW bits selects row and (in 1T-1C mode) the column of each pair, and the
// mode and column of an outstanding read are held until its data returns.
// While a read is outstanding no request is taken; writes otherwise queue
// in the sequencer's one-entry buffer, so consecutive row writes run back to
// back. Timing of each design is given in its own
// module. The designs are not connected to one another; the document treats
// them as separate chips.
//
// Putting the five designs side by side, the FRAM word-address mapping and
// the SONOS internal wiring are this design's own choices.
module crosspoint_top
  import hirise_pkg::*;
  import cfgmem_pkg::*;
  import sonos_pkg::*;
#(
  // Hi-Rise
  parameter int unsigned HR_N = 64,
  parameter int unsigned HR_L = 4,
  parameter int unsigned HR_C = 4,
  parameter int unsigned HR_W = 128,
  // configurable memory
  parameter int unsigned CM_ROWS = 64,
  parameter int unsigned CM_COLS = 64,
  // PUF
  parameter int unsigned PF_ROWS   = 64,
  parameter int unsigned PF_COLS   = 64,
  parameter int unsigned PF_MAXSEQ = 4,
  // SONOS flash
  parameter int unsigned SN_NBL   = 1024,
  parameter int unsigned SN_ROWS  = 260,
  parameter int unsigned SN_PROG  = 1000,
  parameter int unsigned SN_ERASE = 1000,
  parameter int unsigned SN_MUX   = 16,
  parameter int unsigned SN_IW    = 8,
  // FRAM
  parameter int unsigned FR_ROWS = 256,
  parameter int unsigned FR_W    = 80,
  parameter int unsigned FR_VW   = 8,
  localparam int unsigned HR_NW  = $clog2(HR_N),
  localparam int unsigned CM_AW  = $clog2((CM_ROWS > CM_COLS) ? CM_ROWS : CM_COLS),
  localparam int unsigned PF_RW  = $clog2(PF_ROWS),
  localparam int unsigned PF_SW  = $clog2(PF_MAXSEQ + 1),
  localparam int unsigned SN_RW  = $clog2(SN_ROWS),
  localparam int unsigned SN_CW  = $clog2(SN_NBL + 1),
  localparam int unsigned SN_SW  = $clog2(SN_MUX),
  localparam int unsigned SN_OUT = SN_NBL / SN_MUX,
  localparam int unsigned FR_RW  = $clog2(FR_ROWS),
  localparam int unsigned FR_AW  = FR_RW + 1,
  localparam int unsigned FR_NC  = 2 * FR_W
) (
  input  logic                           clk,
  input  logic                           rst_n,

  // ---------------- Hi-Rise switch
  input  logic [HR_N-1:0]                hr_in_req,
  input  logic [HR_N-1:0][HR_NW-1:0]     hr_in_dest,
  input  logic [HR_N-1:0]                hr_in_valid,
  input  logic [HR_N-1:0]                hr_in_release,
  input  logic [HR_N-1:0][HR_W-1:0]      hr_in_data,
  output logic [HR_N-1:0]                hr_in_grant,
  output logic [HR_N-1:0]                hr_in_connected,
  output logic [HR_N-1:0]                hr_out_busy,
  output logic [HR_N-1:0]                hr_out_valid,
  output logic [HR_N-1:0][HR_W-1:0]      hr_out_data,
  output logic [HR_N-1:0][HR_NW-1:0]     hr_out_src,
  output logic [HR_N-1:0]                hr_out_class_win,

  // ---------------- configurable memory
  input  logic                           cm_cmd_valid,
  output logic                           cm_cmd_ready,
  input  op_e                            cm_cmd_op,
  input  logic [CM_AW-1:0]               cm_cmd_addr,
  input  logic [CM_COLS-1:0]             cm_cmd_row_data,
  input  logic [CM_ROWS-1:0]             cm_cmd_key,
  input  logic [CM_ROWS-1:0]             cm_cmd_mask,
  output logic                           cm_res_valid,
  output op_e                            cm_res_op,
  output logic [CM_COLS-1:0]             cm_rdata,
  output logic [CM_COLS-1:0]             cm_bcam_match,
  output logic [CM_COLS/2-1:0]           cm_tcam_match,
  output logic [CM_COLS-1:0]             cm_sa_out,
  output logic [CM_COLS-1:0]             cm_sa_outb,

  // ---------------- sequence-dependent PUF
  input  logic                           pf_cmd_valid,
  input  logic [1:0]                     pf_cmd,
  output logic                           pf_cmd_ready,
  input  logic [PF_RW-1:0]               pf_row_a,
  input  logic [PF_COLS-1:0]             pf_wdata,
  input  logic [PF_SW-1:0]               pf_seq_len,
  input  logic [PF_MAXSEQ-1:0][PF_RW-1:0] pf_seq_a,
  input  logic [PF_MAXSEQ-1:0][PF_RW-1:0] pf_seq_b,
  input  logic [3:0]                     pf_cfg_pre,
  input  logic [3:0]                     pf_cfg_eq,
  output logic [PF_COLS-1:0]             pf_rdata,
  output logic                           pf_rdata_valid,
  output logic [PF_ROWS-1:0]             pf_wl,
  output logic                           pf_preb,
  output logic                           pf_eqb,
  output logic                           pf_sa_en,

  // ---------------- SONOS flash
  input  logic                           sn_start,
  input  logic                           sn_erase,
  input  logic [SN_RW-1:0]               sn_row,
  input  logic [SN_NBL-1:0]              sn_data,
  input  logic                           sn_pump_ok,
  output logic                           sn_busy,
  output logic                           sn_done,
  output logic [SN_RW-1:0]               sn_row_q,
  output rail_e [SN_NBL-1:0]             sn_rail,
  output logic [SN_CW-1:0]               sn_n_rise,
  output logic [SN_CW-1:0]               sn_n_fall,
  output logic [2:0]                     sn_tp_step,
  output logic                           sn_tp_en,
  output logic                           sn_rail_short,
  output logic                           sn_rail_recycle,
  output logic                           sn_wl_prog,
  output logic                           sn_wl_erase,
  input  logic                           sn_rd_en,
  input  logic                           sn_erase_verify,
  input  logic [SN_SW-1:0]               sn_col,
  input  logic [SN_NBL-1:0][SN_IW-1:0]   sn_cell_i,
  input  logic [SN_IW-1:0]               sn_ref_erase_i,
  input  logic [SN_IW-1:0]               sn_ref_prog_i,
  output logic [SN_OUT-1:0]              sn_rdata,
  output logic                           sn_rvalid,

  // ---------------- adiabatic FRAM
  input  logic                           fr_pu,
  input  logic                           fr_pd,
  input  logic                           fr_mode_2t2c,
  input  logic                           fr_req_valid,
  output logic                           fr_req_ready,
  input  logic                           fr_req_we,
  input  logic [FR_AW-1:0]               fr_req_addr,
  input  logic [FR_W-1:0]                fr_req_wword,
  output logic                           fr_rvalid,
  output logic [FR_W-1:0]                fr_rword,
  output logic [FR_RW-1:0]               fr_row,
  output logic                           fr_wl,
  output logic [FR_NC-1:0]               fr_plen,
  output logic [FR_NC-1:0]               fr_wren,
  output logic [FR_NC-1:0]               fr_bl_d,
  output logic                           fr_pre,
  output logic                           fr_sa_en,
  input  logic [FR_NC-1:0][FR_VW-1:0]    fr_bl_v,
  input  logic [FR_VW-1:0]               fr_vref,
  output logic                           fr_busy,
  output logic                           fr_row_done
);

  // ---------------- Hi-Rise
  hirise_switch #(.N(HR_N), .L(HR_L), .C(HR_C), .W(HR_W)) u_hirise (
    .clk, .rst_n,
    .in_req(hr_in_req), .in_dest(hr_in_dest), .in_valid(hr_in_valid),
    .in_release(hr_in_release), .in_data(hr_in_data),
    .in_grant(hr_in_grant), .in_connected(hr_in_connected),
    .out_busy(hr_out_busy), .out_valid(hr_out_valid), .out_data(hr_out_data),
    .out_src(hr_out_src), .out_class_win(hr_out_class_win)
  );

  // ---------------- configurable memory
  cfgmem #(.ROWS(CM_ROWS), .COLS(CM_COLS)) u_cfgmem (
    .clk, .rst_n,
    .cmd_valid(cm_cmd_valid), .cmd_ready(cm_cmd_ready), .cmd_op(cm_cmd_op),
    .cmd_addr(cm_cmd_addr), .cmd_row_data(cm_cmd_row_data),
    .cmd_key(cm_cmd_key), .cmd_mask(cm_cmd_mask),
    .res_valid(cm_res_valid), .res_op(cm_res_op), .rdata(cm_rdata),
    .bcam_match(cm_bcam_match), .tcam_match(cm_tcam_match),
    .sa_out(cm_sa_out), .sa_outb(cm_sa_outb)
  );

  // ---------------- PUF
  seq_puf #(.ROWS(PF_ROWS), .COLS(PF_COLS), .MAXSEQ(PF_MAXSEQ)) u_puf (
    .clk, .rst_n,
    .cmd_valid(pf_cmd_valid), .cmd(pf_cmd), .cmd_ready(pf_cmd_ready),
    .row_a(pf_row_a), .wdata(pf_wdata), .seq_len(pf_seq_len),
    .seq_a(pf_seq_a), .seq_b(pf_seq_b), .cfg_pre(pf_cfg_pre), .cfg_eq(pf_cfg_eq),
    .rdata(pf_rdata), .rdata_valid(pf_rdata_valid),
    .wl(pf_wl), .preb(pf_preb), .eqb(pf_eqb), .sa_en(pf_sa_en)
  );

  // ---------------- SONOS flash
  logic [SN_NBL-1:0] sn_data_q;
  phase_e            sn_phase;
  logic              sn_commit;

  sonos_program_ctrl #(.NBL(SN_NBL), .ROWS(SN_ROWS), .PROG_CYCLES(SN_PROG),
                       .ERASE_CYCLES(SN_ERASE)) u_sn_ctrl (
    .clk, .rst_n,
    .start(sn_start), .erase(sn_erase), .row(sn_row), .data(sn_data),
    .pump_ok(sn_pump_ok), .busy(sn_busy), .done(sn_done),
    .row_q(sn_row_q), .data_q(sn_data_q), .phase(sn_phase), .commit(sn_commit),
    .tp_step(sn_tp_step), .tp_en(sn_tp_en), .rail_short(sn_rail_short),
    .rail_recycle(sn_rail_recycle), .wl_prog(sn_wl_prog), .wl_erase(sn_wl_erase)
  );

  sonos_bl_select #(.NBL(SN_NBL)) u_sn_bl (
    .clk, .rst_n,
    .phase(sn_phase), .new_data(sn_data_q), .commit(sn_commit),
    .rail(sn_rail), .n_rise(sn_n_rise), .n_fall(sn_n_fall)
  );

  sonos_read_path #(.NBL(SN_NBL), .MUX(SN_MUX), .IW(SN_IW)) u_sn_rd (
    .clk, .rst_n,
    .rd_en(sn_rd_en), .erase_verify(sn_erase_verify), .col(sn_col),
    .cell_i(sn_cell_i), .ref_erase_i(sn_ref_erase_i), .ref_prog_i(sn_ref_prog_i),
    .rdata(sn_rdata), .rvalid(sn_rvalid)
  );

  // ---------------- FRAM
  logic              fr_rd_out, fr_rd_sel, fr_rd_mode;
  logic              fr_ctrl_ready, fr_accept;
  logic              fr_sel, fr_mux_sel, fr_mux_mode;
  logic [FR_RW-1:0]  fr_req_row;
  logic [FR_NC-1:0]  fr_col_en, fr_col_d, fr_sense_d, fr_rdata_phys;

  // 1T-1C: row = addr >> 1, column of the pair = addr[0]; 2T-2C: row = addr
  assign fr_sel       = fr_mode_2t2c ? 1'b0 : fr_req_addr[0];
  assign fr_req_row   = fr_mode_2t2c ? fr_req_addr[FR_RW-1:0] : fr_req_addr[FR_AW-1:1];
  assign fr_req_ready = fr_ctrl_ready && !fr_rd_out;
  assign fr_accept    = fr_req_valid && fr_req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fr_rd_out  <= 1'b0;
      fr_rd_sel  <= 1'b0;
      fr_rd_mode <= 1'b0;
    end else begin
      if (fr_rvalid) fr_rd_out <= 1'b0;
      if (fr_accept && !fr_req_we) begin
        fr_rd_out  <= 1'b1;
        fr_rd_sel  <= fr_sel;
        fr_rd_mode <= fr_mode_2t2c;
      end
    end
  end

  // while a read is outstanding the column mux keeps that read's mode and
  // column for sensing and word assembly; new requests wait for its data
  assign fr_mux_sel  = fr_rd_out ? fr_rd_sel  : fr_sel;
  assign fr_mux_mode = fr_rd_out ? fr_rd_mode : fr_mode_2t2c;

  fram_colmux #(.W(FR_W), .VW(FR_VW)) u_fr_mux (
    .mode_2t2c(fr_mux_mode), .sel(fr_mux_sel), .wword(fr_req_wword),
    .col_en(fr_col_en), .col_d(fr_col_d),
    .bl_v(fr_bl_v), .vref(fr_vref), .sense_d(fr_sense_d),
    .rdata_phys(fr_rdata_phys), .rword(fr_rword)
  );

  fram_ctrl #(.ROWS(FR_ROWS), .NCOL(FR_NC)) u_fr_ctrl (
    .clk, .rst_n,
    .pu(fr_pu), .pd(fr_pd),
    .req_valid(fr_accept), .req_ready(fr_ctrl_ready), .req_we(fr_req_we),
    .req_row(fr_req_row), .req_col_en(fr_col_en), .req_col_d(fr_col_d),
    .rvalid(fr_rvalid), .rdata(fr_rdata_phys),
    .row(fr_row), .wl(fr_wl), .plen(fr_plen), .wren(fr_wren), .bl_d(fr_bl_d),
    .pre(fr_pre), .sa_en(fr_sa_en), .sense_d(fr_sense_d),
    .busy(fr_busy), .row_done(fr_row_done)
  );

endmodule
