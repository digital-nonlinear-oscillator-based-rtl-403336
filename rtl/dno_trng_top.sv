// dno_trng_top: true random number generator built on digital nonlinear
// oscillators (DNOs), with on-line selection of the best oscillator setting
// and an acquisition path to a host.
//
// Datapath
//   tunable_dno -> sync_sampler -> (raw bit) -> lfsr_whitener -> rnd_bit_o
//   The tunable DNO offers 64 configurations (sel). While tune_en is high
//   the Maximum Worst-Case Entropy Selector (mwces) steps sel through all
//   64, estimates for each how quickly its most frequent K-bit symbol
//   reaches 2^L occurrences, and keeps the slowest (highest min-entropy).
//   When it is done, sel is fixed to the winner and the sampled bits, XORed
//   with an 8-bit LFSR key stream, appear on rnd_bit_o with rnd_valid_o.
//   Dropping tune_en and raising it again re-tunes (for example after a
//   temperature change).
//
//   dno_c x2 -> sync_sampler x2 -> xor_combiner -> dual_bit_o
//   Two fixed DNOs whose sampled bits are XORed (2:1 compression), the
//   alternative remedy for placement-to-placement spread.
//
//   acq_buffer -> uart_tx -> uart_txd_o
//   On acq_start_i the stream chosen by acq_src_i is stored, acq_len_i bytes
//   of it, in on-chip RAM and then sent over the RS232 line, so that a host
//   can analyse raw or processed sequences. acq_src_i: 0 whitened tuned
//   stream (only while rnd_valid_o), 1 raw tuned stream, 2 dual-DNO XOR
//   stream, 3 raw stream of one fixed DNO.
//
// Clock and reset: clk is the sampling clock (400 MHz in the reference set-
// up, produced by an FPGA PLL outside this module); rst_n is an active-low
// synchronous reset of all clocked blocks except the selector, which is
// held cleared while tune_en is low. The oscillators are asynchronous
// circuits and are represented by behavioural models, so this module
// simulates but only its clocked part is synthesizable as written; on an
// FPGA the oscillator LUTs are placed by hand.
//
// The block structure follows the published design; the port list, the
// source-select codes, the gating of the whitened stream by tune_done and
// the acquisition handshake are this design's own.
module dno_trng_top #(
  parameter int unsigned K            = 3,       // selector symbol length
  parameter int unsigned L            = 8,       // selector overflow 2^L
  parameter int unsigned ACQ_DEPTH    = 131072,  // acquisition RAM, bytes
  parameter int unsigned CLKS_PER_BIT = 3472,    // RS232 bit time in clk cycles
  parameter int unsigned SEED         = 1,       // placement of the oscillators
  localparam int unsigned AW          = $clog2(ACQ_DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  // selector
  input  logic         tune_en_i,
  output logic         tune_done_o,
  output logic [5:0]   dno_sel_o,
  output logic [5:0]   best_sel_o,
  output logic [K+L-1:0] best_cnt_o,
  // random streams
  output logic         raw_valid_o,
  output logic         raw_bit_o,
  output logic         rnd_valid_o,
  output logic         rnd_bit_o,
  output logic         dual_valid_o,
  output logic         dual_bit_o,
  output logic [1:0]   fixed_bits_o,
  // acquisition
  input  logic         acq_start_i,
  input  logic [1:0]   acq_src_i,
  input  logic [AW:0]  acq_len_i,
  output logic         acq_busy_o,
  output logic         acq_done_o,
  output logic         uart_txd_o
);

  // ---------------- tunable oscillator and selector ----------------
  logic       z_tun;
  logic [5:0] sel_scan;

  tunable_dno #(.SEED(SEED)) u_tdno (.sel(dno_sel_o), .z(z_tun));

  sync_sampler u_samp_t (.clk(clk), .rst_n(rst_n), .z_i(z_tun),
                         .bit_o(raw_bit_o), .valid_o(raw_valid_o));

  mwces #(.N_SRC(64), .K(K), .L(L)) u_mwces (
    .clk(clk), .en(tune_en_i), .sample_i(raw_bit_o), .srcsel_o(sel_scan),
    .best_src_o(best_sel_o), .best_cnt_o(best_cnt_o), .done_o(tune_done_o));

  // While scanning the selector drives the oscillator configuration; once it
  // is done the winner is applied.
  assign dno_sel_o = tune_done_o ? best_sel_o : sel_scan;

  lfsr_whitener u_white (.clk(clk), .rst_n(rst_n),
                         .valid_i(raw_valid_o && tune_done_o), .bit_i(raw_bit_o),
                         .valid_o(rnd_valid_o), .bit_o(rnd_bit_o));

  // ---------------- dual fixed oscillators, 2:1 XOR ----------------
  logic [1:0] z_fix, b_fix, v_fix;

  for (genvar i = 0; i < 2; i++) begin : g_fixed
    dno_c #(.SEED(SEED * 2 + 101 + i)) u_dno (.z(z_fix[i]));
    sync_sampler u_samp (.clk(clk), .rst_n(rst_n), .z_i(z_fix[i]),
                         .bit_o(b_fix[i]), .valid_o(v_fix[i]));
  end

  xor_combiner #(.N_IN(2)) u_xor (.clk(clk), .rst_n(rst_n), .valid_i(&v_fix),
                                  .bits_i(b_fix), .valid_o(dual_valid_o), .bit_o(dual_bit_o));

  assign fixed_bits_o = b_fix;

  // ---------------- acquisition RAM and RS232 link ----------------
  logic       acq_bit, acq_bit_valid;
  logic       tx_valid, tx_ready;
  logic [7:0] tx_data;

  always_comb begin
    unique case (acq_src_i)
      2'd0: begin acq_bit = rnd_bit_o;   acq_bit_valid = rnd_valid_o;  end
      2'd1: begin acq_bit = raw_bit_o;   acq_bit_valid = raw_valid_o;  end
      2'd2: begin acq_bit = dual_bit_o;  acq_bit_valid = dual_valid_o; end
      default: begin acq_bit = b_fix[0]; acq_bit_valid = v_fix[0];     end
    endcase
  end

  acq_buffer #(.DEPTH(ACQ_DEPTH)) u_acq (
    .clk(clk), .rst_n(rst_n), .start_i(acq_start_i), .len_bytes_i(acq_len_i),
    .bit_valid_i(acq_bit_valid), .bit_i(acq_bit),
    .tx_valid_o(tx_valid), .tx_data_o(tx_data), .tx_ready_i(tx_ready),
    .busy_o(acq_busy_o), .done_o(acq_done_o));

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart (
    .clk(clk), .rst_n(rst_n), .valid_i(tx_valid), .data_i(tx_data),
    .ready_o(tx_ready), .txd_o(uart_txd_o));

endmodule
