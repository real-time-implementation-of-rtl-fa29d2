// rmm_linc_tx_top: OQPSK transmitter with ring-type magnitude modulation and
// LINC decomposition, ready to feed two RF DAC channels.
//
// Datapath (one 100 MHz clock):
//   generator (RNG -> RMM -> x8 OQPSK upsampler, 1 pair/clock, frames of 32)
//   -> sync_fifo (64 deep)
//   -> rrc_fir (113-tap RRC, enabled by frame_counter for 32 cycles per frame)
//   -> pair_packer (two adjacent samples per word, as the DAC path expects)
//   -> sync_fifo (16 deep)
//   -> linc_lut        : System #1 branches (tx_lut_left / tx_lut_right)
//   -> linc_calculator : System #2 branches (tx_calc_left / tx_calc_right)
// The original design built System #1 and System #2 as two separate
// bitstreams sharing everything but the LINC block; here both decomposers
// sit side by side on the same RRC output so both can be used and compared.
// Each left branch goes to the DAC of one RF card and each right branch to
// the other card; the cards, the DAC firmware, the host interface and the
// processor are outside this RTL and appear only as ports.
//
// User controls: `btn_rmm` toggles RMM (rmm_activator, off after reset);
// `btn_sel` toggles the host feedback channel (output_selector) between the
// RRC output and the LINC left branch of the decomposer chosen by
// FEEDBACK_LUT (0: calculator, 1: table); `host_stop` pauses it.
// `max_sq` is the squared clipping level of the calculator. The RMM
// coefficient tables are loaded through the lut_* port; the generator state
// (seed, symbol register) can be read and restored through the gen_* ports.
//
// Latency from the first generator sample to the first LINC pair: about 40
// cycles (first frame of 32, Counter start, filter, packing, FIFO, LINC).
// Throughput: one complex sample per clock through the filter, one pair of
// samples every second clock per LINC output. Synchronous active-high reset.
//
// Left open on purpose: the FIFO fill counts, the full flag of the LINC FIFO
// (it is read in every cycle it holds data, so it cannot fill), and the
// generator phase, burst start and channel-select state, which are kept as
// internal signals for observation only.
module rmm_linc_tx_top
  import glinc_pkg::*;
#(
  parameter int unsigned RRC_NSYM     = RRC_NSYM_MAX,
  parameter int unsigned GEN_FIFO     = 64,
  parameter int unsigned LINC_FIFO    = 16,
  parameter int unsigned DEBOUNCE     = 1_000_000,
  parameter bit          FEEDBACK_LUT = 1'b0
)(
  input  logic              clk,
  input  logic              rst,
  input  logic              run,
  input  logic              btn_rmm,
  input  logic              btn_sel,
  input  logic              host_stop,
  input  logic [31:0]       max_sq,
  // RMM table load
  input  logic              lut_we,
  input  logic [RMM_AW-1:0] lut_waddr,
  input  mm_coef_t          lut_wi,
  input  mm_coef_t          lut_wq,
  // generator state continuity
  input  logic              gen_load,
  input  logic [SEED_W-1:0] gen_seed_in,
  input  logic [RMM_AW-1:0] gen_sreg_in,
  output logic [SEED_W-1:0] gen_seed,
  output logic [RMM_AW-1:0] gen_sreg,
  // System #1 (table LINC) branches, to the two RF cards
  output logic              tx_lut_valid,
  output iq16_pair_t        tx_lut_left,
  output iq16_pair_t        tx_lut_right,
  // System #2 (calculator LINC) branches
  output logic              tx_calc_valid,
  output iq16_pair_t        tx_calc_left,
  output iq16_pair_t        tx_calc_right,
  output logic [1:0]        tx_calc_clip,
  // feedback channel to the host output FIFO
  output logic              host_dval,
  output logic [63:0]       host_data,
  // LEDs: [1:0] RMM on, [2] SW5 follower, [4:3] RRC selected, [5] SW7 follower
  output logic [5:0]        led
);

  // ------------------------------------------------------------ controls
  logic mm_on, sel_linc;

  rmm_activator #(.DEBOUNCE(DEBOUNCE)) u_rmm_btn (
    .clk, .rst, .btn(btn_rmm),
    .mm_on, .led_state(led[1:0]), .led_btn(led[2])
  );

  // ----------------------------------------------------------- generator
  logic    gen_valid, gen_ready, gen_done;
  gen_iq_t gen_out;
  logic [$clog2(UPS_L)-1:0] gen_phase;

  generator u_gen (
    .clk, .rst, .run, .mm_on,
    .out_valid(gen_valid), .out_ready(gen_ready), .out(gen_out),
    .frame_done(gen_done), .out_phase(gen_phase),
    .load(gen_load), .seed_in(gen_seed_in), .sreg_in(gen_sreg_in),
    .seed(gen_seed), .sreg(gen_sreg),
    .lut_we, .lut_waddr, .lut_wi, .lut_wq
  );

  logic    f0_full, f0_empty, f0_rd;
  gen_iq_t f0_data;

  sync_fifo #(.W($bits(gen_iq_t)), .DEPTH(GEN_FIFO)) u_gen_fifo (
    .clk, .rst,
    .wr_en(gen_valid && gen_ready), .wr_data(gen_out), .full(f0_full),
    .rd_en(f0_rd), .rd_data(f0_data), .empty(f0_empty), .count()
  );
  assign gen_ready = !f0_full;

  // ------------------------------------------------------- counter + RRC
  logic rrc_en, burst_start;

  frame_counter #(.BURST(4*UPS_L)) u_counter (
    .clk, .rst, .gen_done, .rrc_en, .burst_start
  );

  assign f0_rd = rrc_en && !f0_empty;

  logic  rrc_valid;
  iq16_t rrc_out;

  rrc_fir #(.NSYM(RRC_NSYM)) u_rrc (
    .clk, .rst, .in_valid(f0_rd), .in(f0_data),
    .out_valid(rrc_valid), .out(rrc_out)
  );

  // ------------------------------------------------------ pairing + LINC
  logic       pk_valid;
  iq16_pair_t pk_out;

  pair_packer u_pack (
    .clk, .rst, .in_valid(rrc_valid), .in(rrc_out),
    .out_valid(pk_valid), .out(pk_out)
  );

  logic       f1_empty, f1_rd;
  iq16_pair_t f1_data;

  sync_fifo #(.W($bits(iq16_pair_t)), .DEPTH(LINC_FIFO)) u_linc_fifo (
    .clk, .rst,
    .wr_en(pk_valid), .wr_data(pk_out), .full(),
    .rd_en(f1_rd), .rd_data(f1_data), .empty(f1_empty), .count()
  );
  assign f1_rd = !f1_empty;

  linc_lut u_linc_lut (
    .clk, .rst, .in_valid(f1_rd), .in(f1_data),
    .out_valid(tx_lut_valid), .left(tx_lut_left), .right(tx_lut_right)
  );

  linc_calculator u_linc_calc (
    .clk, .rst, .in_valid(f1_rd), .in(f1_data), .max_sq,
    .out_valid(tx_calc_valid), .left(tx_calc_left), .right(tx_calc_right),
    .clip(tx_calc_clip)
  );

  // ------------------------------------------------------ host feedback
  output_selector #(.DEBOUNCE(DEBOUNCE)) u_sel (
    .clk, .rst, .btn(btn_sel), .stop(host_stop),
    .rrc_valid, .rrc_data(rrc_out),
    .linc_valid(FEEDBACK_LUT ? tx_lut_valid : tx_calc_valid),
    .linc_left (FEEDBACK_LUT ? tx_lut_left  : tx_calc_left),
    .dval(host_dval), .data(host_data), .sel_linc,
    .led_state(led[4:3]), .led_btn(led[5])
  );

endmodule
