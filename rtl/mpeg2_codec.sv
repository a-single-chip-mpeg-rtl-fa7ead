// mpeg2_codec: top level of the single-chip MPEG-2 codec.
// Six media modules (MMs) share one main bus to the external SDRAM, through which
// all data passes from one MM to the next; the bus is arbitrated fair round-robin
// and carries the hardware semaphore registers that guard shared SDRAM regions.
// Each MM is a processor shell (data RAM, DMA controller, bus bridge, interrupt
// controller) plus the engines fitted to its task:
//   0 bitstream mux/demux : stream I/O engine
//   1 audio               : VLIW MAC coprocessor, optional core instructions, IIS I/O
//   2 video enc/dec       : VLD and VLC DSP extensions with their bitstream RAMs,
//                           PMV, DCT/IDCT, Q/IQ, MC and fine ME engines, SIMD UCI
//   3 motion estimation   : block-matching engine (two 8x8 engines, double buffers)
//   4 video pre/post      : BT.656 video I/O (the video filter is not built)
//   5 general control     : no extension
// The processor cores are not part of this RTL, so everything a core drives comes
// in on ports: its data RAM port, its main-bus port and its control bus (per MM,
// arrays indexed by MM number), and the instruction-level interfaces of the DSP
// extensions, coprocessor and custom instructions. In MM 3 the DMA's local bus
// fills the block-matching buffers and the control bus runs the engine; in MM 2
// the local bus fills the VLD bitstream RAM and empties the VLC RAM. The shared
// SDRAM is external: its controller port is brought out as mem_req/mem_rsp.
module mpeg2_codec
  import codec_pkg::*;
#(
  parameter int unsigned DRAM_DEPTH = 4096,
  parameter int unsigned N_SEM      = 16,
  parameter int unsigned ME_R       = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // shared SDRAM controller port
  output bus_req_t    mem_req,
  input  bus_rsp_t    mem_rsp,
  output logic [N_SEM-1:0] sem_locked,
  // processor core side of every MM
  input  logic        core_dr_en    [NUM_MM],
  input  logic        core_dr_we    [NUM_MM],
  input  logic [$clog2(DRAM_DEPTH)-1:0] core_dr_addr [NUM_MM],
  input  logic [31:0] core_dr_wdata [NUM_MM],
  output logic [31:0] core_dr_rdata [NUM_MM],
  input  bus_req_t    core_req      [NUM_MM],
  output bus_rsp_t    core_rsp      [NUM_MM],
  input  logic        cb_we         [NUM_MM],
  input  logic [7:0]  cb_addr       [NUM_MM],
  input  logic [31:0] cb_wdata      [NUM_MM],
  output logic [31:0] cb_rdata      [NUM_MM],
  input  logic [7:0]  irq_enable    [NUM_MM],
  input  logic [1:0]  irq_level     [NUM_MM][8],
  input  logic        irq_ack       [NUM_MM],
  input  logic [2:0]  irq_ack_id    [NUM_MM],
  output logic        irq           [NUM_MM],
  output logic [2:0]  irq_id        [NUM_MM],
  output logic [NUM_MM-1:0] bus_grant_seen,
  // ---- MM 0: stream I/O
  input  logic        si_valid, si_sync,
  input  logic [7:0]  si_data,
  input  logic        bs_in_pop,
  output logic [31:0] bs_in_data,
  output logic        bs_in_empty,
  input  logic        bs_out_push,
  input  logic [31:0] bs_out_data,
  output logic        so_valid,
  output logic [7:0]  so_data,
  input  logic        so_ready,
  // ---- MM 1: audio
  input  logic        cop_valid,
  input  logic [4:0]  cop_op,
  input  logic [2:0]  cop_rd, cop_rs, cop_rt,
  input  logic        cop_acc,
  input  logic [5:0]  cop_sa,
  input  logic        cop_use_core,
  input  logic [31:0] cop_gpr_in, cop_ld_data,
  output logic [31:0] cop_gpr_out,
  output logic [63:0] cop_acc_out [2],
  input  logic [2:0]  opt_op,
  input  logic [31:0] opt_rs, opt_rt,
  input  logic [4:0]  opt_imm,
  output logic [31:0] opt_rd,
  input  logic        i2s_rx_sck, i2s_rx_ws, i2s_rx_sd,
  input  logic        i2s_tx_wr,
  input  logic [1:0]  i2s_tx_port,
  input  logic [15:0] i2s_tx_left, i2s_tx_right,
  output logic        i2s_tx_sck, i2s_tx_ws,
  output logic [2:0]  i2s_tx_sd,
  output logic [15:0] i2s_rx_left, i2s_rx_right,
  // ---- MM 2: video encode/decode
  input  logic        vld_start,
  input  logic [15:0] vld_start_addr,
  input  logic        vld_cmd_valid,
  input  logic [1:0]  vld_cmd_op,
  input  logic [5:0]  vld_cmd_n,
  output logic        vld_cmd_ready,
  output logic        vld_res_valid,
  output logic [31:0] vld_res_data,
  input  logic        vlc_start,
  input  logic [15:0] vlc_start_addr,
  input  logic        vlc_put,
  input  logic [5:0]  vlc_n,
  input  logic [31:0] vlc_code,
  input  logic        vlc_flush,
  output logic [31:0] vlc_bit_count,
  input  logic        pmv_reset, pmv_req, pmv_r, pmv_s, pmv_t, pmv_fld,
  input  logic [3:0]  pmv_f_code,
  input  logic signed [5:0] pmv_motion_code,
  input  logic [7:0]  pmv_motion_residual,
  output logic        pmv_valid,
  output logic signed [15:0] pmv_vector,
  input  logic        dct_in_we,
  input  logic [5:0]  dct_in_addr,
  input  logic signed [15:0] dct_in_data,
  input  logic        dct_start,
  input  logic [1:0]  dct_mode,
  output logic        dct_busy, dct_done,
  input  logic [5:0]  dct_rd_addr,
  output logic signed [15:0] dct_rd_data,
  input  logic        q_w_we, q_w_sel,
  input  logic [5:0]  q_w_addr,
  input  logic [7:0]  q_w_data,
  input  logic        q_inv, q_intra,
  input  logic [6:0]  q_qscale,
  input  logic [1:0]  q_dc_prec,
  input  logic        q_in_valid, q_in_first,
  input  logic signed [15:0] q_in_data,
  output logic        q_out_valid,
  output logic signed [15:0] q_out_data,
  input  logic        mc_in_valid,
  input  logic [1:0]  mc_mode,
  input  logic        mc_hx_f, mc_hy_f, mc_hx_b, mc_hy_b,
  input  logic [7:0]  mc_fwd [8][4],
  input  logic [7:0]  mc_bwd [8][4],
  input  logic signed [15:0] mc_resid [8],
  output logic        mc_out_valid,
  output logic [7:0]  mc_pred [8],
  output logic [7:0]  mc_recon [8],
  input  logic        mef_tgt_we,
  input  logic [7:0]  mef_tgt_addr, mef_tgt_data,
  input  logic        mef_ref_we, mef_ref_dir,
  input  logic [8:0]  mef_ref_addr,
  input  logic [7:0]  mef_ref_data,
  input  logic        mef_start,
  input  logic [3:0]  mef_enable,
  output logic        mef_busy, mef_done,
  output logic [1:0]  mef_mode,
  output logic [15:0] mef_activity,
  input  logic [7:0]  mef_pred_addr,
  output logic [7:0]  mef_pred_data,
  input  logic [3:0]  uci_op,
  input  logic [31:0] uci_rs, uci_rt,
  input  logic [15:0] uci_imm,
  output logic [31:0] uci_rd,
  // ---- MM 4: video I/O
  input  logic        vid_en,
  input  logic [7:0]  vid_in,
  output logic        vid_in_word_valid,
  output logic [31:0] vid_in_word,
  output logic [8:0]  vid_in_word_idx,
  output logic [7:0]  vid_out,
  output logic        vid_out_px_req,
  input  logic [7:0]  vid_out_px_data
);
  bus_req_t mb_req [NUM_MM];
  bus_rsp_t mb_rsp [NUM_MM];
  logic        hwe_we    [NUM_MM];
  logic [7:0]  hwe_addr  [NUM_MM];
  logic [31:0] hwe_wdata [NUM_MM];
  logic [31:0] hwe_rdata [NUM_MM];
  logic        lb_en     [NUM_MM];
  logic        lb_we     [NUM_MM];
  logic [15:0] lb_addr   [NUM_MM];
  logic [31:0] lb_wdata  [NUM_MM];
  logic [31:0] lb_rdata  [NUM_MM];
  logic        dma_irq   [NUM_MM];
  logic [7:0]  irq_src   [NUM_MM];

  main_bus #(.N_MM(NUM_MM), .N_SEM(N_SEM)) u_bus (
    .clk, .rst_n, .m_req(mb_req), .m_rsp(mb_rsp), .mem_req, .mem_rsp,
    .sem_locked, .grant_seen(bus_grant_seen));

  for (genvar m = 0; m < NUM_MM; m++) begin : g_mm
    media_module #(.DRAM_DEPTH(DRAM_DEPTH)) u_mm (
      .clk, .rst_n,
      .core_dr_en(core_dr_en[m]), .core_dr_we(core_dr_we[m]), .core_dr_addr(core_dr_addr[m]),
      .core_dr_wdata(core_dr_wdata[m]), .core_dr_rdata(core_dr_rdata[m]),
      .core_req(core_req[m]), .core_rsp(core_rsp[m]),
      .cb_we(cb_we[m]), .cb_addr(cb_addr[m]), .cb_wdata(cb_wdata[m]), .cb_rdata(cb_rdata[m]),
      .hwe_we(hwe_we[m]), .hwe_addr(hwe_addr[m]), .hwe_wdata(hwe_wdata[m]), .hwe_rdata(hwe_rdata[m]),
      .lb_en(lb_en[m]), .lb_we(lb_we[m]), .lb_addr(lb_addr[m]), .lb_wdata(lb_wdata[m]), .lb_rdata(lb_rdata[m]),
      .mb_req(mb_req[m]), .mb_rsp(mb_rsp[m]), .dma_busy(), .dma_irq(dma_irq[m]));

    intc #(.N_SRC(8)) u_intc (
      .clk, .rst_n, .src(irq_src[m]), .enable(irq_enable[m]), .level(irq_level[m]),
      .ack(irq_ack[m]), .ack_id(irq_ack_id[m]), .irq(irq[m]), .irq_id(irq_id[m]), .irq_level());
  end

  // ---------------- MM 0: bitstream mux/demux
  logic bs_in_irq, bs_out_irq;
  bitstream_io_hwe u_bsio (
    .clk, .rst_n, .si_valid, .si_sync, .si_data, .in_pop(bs_in_pop), .in_data(bs_in_data),
    .in_empty(bs_in_empty), .in_level(), .in_irq(bs_in_irq), .overflow(),
    .out_push(bs_out_push), .out_data(bs_out_data), .out_full(), .so_valid, .so_data, .so_ready,
    .out_irq(bs_out_irq));
  assign irq_src[0] = {5'd0, bs_out_irq, bs_in_irq, dma_irq[0]};

  // ---------------- MM 1: audio
  logic aud_rx_irq, aud_tx_irq;
  audio_vliw_cop u_cop (
    .clk, .rst_n, .valid(cop_valid), .op(cop_op), .rd(cop_rd), .rs(cop_rs), .rt(cop_rt),
    .acc(cop_acc), .sa(cop_sa), .use_core(cop_use_core), .gpr_in(cop_gpr_in), .ld_data(cop_ld_data),
    .gpr_out(cop_gpr_out), .acc_out(cop_acc_out));
  core_opt_unit u_opt (.op(opt_op), .rs(opt_rs), .rt(opt_rt), .imm(opt_imm), .rd(opt_rd));
  audio_io_hwe #(.W(16)) u_aio (
    .clk, .rst_n, .rx_sck(i2s_rx_sck), .rx_ws(i2s_rx_ws), .rx_sd(i2s_rx_sd),
    .rx_left(i2s_rx_left), .rx_right(i2s_rx_right), .rx_irq(aud_rx_irq),
    .tx_wr(i2s_tx_wr), .tx_port(i2s_tx_port), .tx_left(i2s_tx_left), .tx_right(i2s_tx_right),
    .tx_sck(i2s_tx_sck), .tx_ws(i2s_tx_ws), .tx_sd(i2s_tx_sd), .tx_irq(aud_tx_irq));
  assign irq_src[1] = {5'd0, aud_tx_irq, aud_rx_irq, dma_irq[1]};

  // ---------------- MM 2: video encode/decode
  logic        vld_mem_en, vlc_mem_we, lb2_sel_q;
  logic [15:0] vld_mem_addr, vlc_mem_addr;
  logic [31:0] vld_mem_rdata, vlc_mem_wdata, vldram_a_rdata, vlcram_a_rdata;
  // local bus: lb_addr[12] = 0 VLD bitstream RAM, 1 VLC bitstream RAM
  dp_ram #(.DEPTH(1024), .W(32)) u_vld_ram (
    .clk,
    .a_en(lb_en[2] && !lb_addr[2][12]), .a_we(lb_we[2]), .a_addr(lb_addr[2][9:0]),
    .a_wdata(lb_wdata[2]), .a_rdata(vldram_a_rdata),
    .b_en(vld_mem_en), .b_we(1'b0), .b_addr(vld_mem_addr[9:0]), .b_wdata('0), .b_rdata(vld_mem_rdata));
  dp_ram #(.DEPTH(1024), .W(32)) u_vlc_ram (
    .clk,
    .a_en(lb_en[2] && lb_addr[2][12]), .a_we(lb_we[2]), .a_addr(lb_addr[2][9:0]),
    .a_wdata(lb_wdata[2]), .a_rdata(vlcram_a_rdata),
    .b_en(vlc_mem_we), .b_we(1'b1), .b_addr(vlc_mem_addr[9:0]), .b_wdata(vlc_mem_wdata), .b_rdata());
  always_ff @(posedge clk) if (lb_en[2]) lb2_sel_q <= lb_addr[2][12];
  assign lb_rdata[2] = lb2_sel_q ? vlcram_a_rdata : vldram_a_rdata;

  vld_unit u_vld (
    .clk, .rst_n, .start(vld_start), .start_addr(vld_start_addr), .cmd_valid(vld_cmd_valid),
    .cmd_op(vld_cmd_op), .cmd_n(vld_cmd_n), .cmd_ready(vld_cmd_ready), .res_valid(vld_res_valid),
    .res_data(vld_res_data), .mem_en(vld_mem_en), .mem_addr(vld_mem_addr), .mem_rdata(vld_mem_rdata),
    .bits_consumed());
  vlc_packer u_vlc (
    .clk, .rst_n, .start(vlc_start), .start_addr(vlc_start_addr), .put(vlc_put), .n(vlc_n),
    .code(vlc_code), .flush(vlc_flush), .mem_we(vlc_mem_we), .mem_addr(vlc_mem_addr),
    .mem_wdata(vlc_mem_wdata), .bit_count(vlc_bit_count));
  pmv_hwe u_pmv (
    .clk, .rst_n, .reset_pmv(pmv_reset), .req(pmv_req), .r_idx(pmv_r), .s_idx(pmv_s), .t_idx(pmv_t),
    .fld(pmv_fld), .f_code(pmv_f_code), .motion_code(pmv_motion_code),
    .motion_residual(pmv_motion_residual), .valid(pmv_valid), .vector(pmv_vector));
  dct_hwe u_dct (
    .clk, .rst_n, .in_we(dct_in_we), .in_addr(dct_in_addr), .in_data(dct_in_data),
    .start(dct_start), .mode(dct_mode), .busy(dct_busy), .done(dct_done),
    .rd_addr(dct_rd_addr), .rd_data(dct_rd_data));
  quant_hwe u_q (
    .clk, .rst_n, .w_we(q_w_we), .w_sel(q_w_sel), .w_addr(q_w_addr), .w_data(q_w_data),
    .inv(q_inv), .intra(q_intra), .qscale(q_qscale), .dc_prec(q_dc_prec),
    .in_valid(q_in_valid), .in_first(q_in_first), .in_data(q_in_data),
    .out_valid(q_out_valid), .out_data(q_out_data));
  mc_hwe #(.LANES(8)) u_mc (
    .clk, .rst_n, .in_valid(mc_in_valid), .mode(mc_mode), .hx_f(mc_hx_f), .hy_f(mc_hy_f),
    .hx_b(mc_hx_b), .hy_b(mc_hy_b), .fwd(mc_fwd), .bwd(mc_bwd), .resid(mc_resid),
    .out_valid(mc_out_valid), .pred(mc_pred), .recon(mc_recon));
  me_fine_hwe u_mef (
    .clk, .rst_n, .tgt_we(mef_tgt_we), .tgt_addr(mef_tgt_addr), .tgt_data(mef_tgt_data),
    .ref_we(mef_ref_we), .ref_dir(mef_ref_dir), .ref_addr(mef_ref_addr), .ref_data(mef_ref_data),
    .start(mef_start), .enable(mef_enable), .busy(mef_busy), .done(mef_done),
    .best_mode(mef_mode), .hv_f(), .hv_b(), .sad_f(), .sad_b(), .sad_bi(),
    .activity(mef_activity), .pred_addr(mef_pred_addr), .pred_data(mef_pred_data));
  simd_uci u_uci (.op(uci_op), .rs(uci_rs), .rt(uci_rt), .imm(uci_imm), .rd(uci_rd));
  assign irq_src[2] = {4'd0, mef_done, dct_done, 1'b0, dma_irq[2]};

  // ---------------- MM 3: motion estimation
  logic me_done;
  me_hwe #(.R(ME_R)) u_me (
    .clk, .rst_n, .lb_en(lb_en[3]), .lb_we(lb_we[3]), .lb_addr(lb_addr[3]), .lb_wdata(lb_wdata[3]),
    .cb_we(hwe_we[3]), .cb_addr(hwe_addr[3]), .cb_wdata(hwe_wdata[3]), .cb_rdata(hwe_rdata[3]),
    .busy(), .done(me_done));
  assign lb_rdata[3] = '0;
  assign irq_src[3] = {6'd0, me_done, dma_irq[3]};

  // ---------------- MM 4: video pre/postprocessing
  logic vin_line_irq, vout_frame_irq;
  video_io_hwe u_vio (
    .clk, .rst_n, .en(vid_en), .vin(vid_in), .in_word_valid(vid_in_word_valid), .in_word(vid_in_word),
    .in_word_idx(vid_in_word_idx), .in_field(), .in_line_irq(vin_line_irq), .in_code_errors(),
    .vout(vid_out), .out_px_req(vid_out_px_req), .out_px_data(vid_out_px_data),
    .out_frame_irq(vout_frame_irq));
  assign irq_src[4] = {5'd0, vout_frame_irq, vin_line_irq, dma_irq[4]};

  // ---------------- MM 5: general control (basic configuration only)
  assign irq_src[5] = {7'd0, dma_irq[5]};

  // MMs without engines on their control bus or local bus
  for (genvar m = 0; m < NUM_MM; m++) begin : g_nohwe
    if (m != 3) begin : g_rd
      assign hwe_rdata[m] = '0;
    end
    if (m != 2 && m != 3) begin : g_lb
      assign lb_rdata[m] = '0;
    end
  end
endmodule
