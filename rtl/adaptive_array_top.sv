// adaptive_array_top: the signal-processing engines of the adaptive array
// antenna evaluation system.
//
//  - Beamforming (mrc_receiver): IF-sampling digital receiver for a 2-element
//    array. Each channel is downconverted to complex baseband by a
//    quasi-coherent detector and equalised by the stored MRC-weight
//    calibration (captured on mrc_cal_start, applied while mrc_cal_en); the
//    weights W1* = |B1|^2, W2* = B1 B2* steer the
//    beam toward the arrival, and y = W1* B1 + W2* B2 is the combined output.
//    The weights leave the chip for the direction-of-arrival calculation done
//    in software.
//  - MUSIC direction finding for a DOA_K-element array: DOA_K further
//    quasi-coherent detectors whose NCOs take a per-element phase and gain
//    correction (qcd_cal_channel, calibration by NCO control; 0 and 1.0
//    leave the channel as it is), the time-averaged correlation
//    matrix (corr_matrix), forward-backward spatial smoothing for coherent
//    waves (spatial_smoothing, active while doa_smooth_en is high), the
//    CORDIC-based cyclic Jacobi eigenvalue decomposition of the real
//    2K x 2K form (evd_processor) and the MUSIC spectrum with its null search
//    (music_spectrum). doa_start runs the whole chain once: 2**DOA_AVG_LOG2
//    snapshots are accumulated, the matrix rows pass through the smoothing
//    unit and are loaded into the EVD processor as they are produced, the
//    decomposition starts on the next cycle, and when it is done the spectrum
//    unit reads the
//    eigenvalues and eigenvectors, streams the spectrum and reports the
//    directions of the DOA_L waves (doa_done).
//
// The EVD processor also keeps a host port, so that any symmetric matrix can
// be decomposed on its own: the host may load rows, start it and read rows
// back whenever the chain is not using it (doa_busy low). Rows read by the
// spectrum unit also appear on evd_rd_valid / evd_rd_data, and host read
// requests are ignored while the spectrum unit reads.
//
// The two engines share the clock and reset and are otherwise independent.
// The order of the MUSIC flow (correlation, spatial smoothing, EVD, spectrum)
// follows the document; the smoothing scheme is this design's. How the blocks
// hand over to each other (row streaming, start pulses, the shared read port) is
// this design's choice. Timing of each block is described in its own module;
// for the defaults, with a sample every cycle, the chain takes
// 64 + 8 + 9 + 7618 + 1471 + 1 = 9171 cycles from doa_start to doa_done.
module adaptive_array_top
  import aa_pkg::*;
#(
  parameter int EVD_SWEEPS   = 4,
  parameter int DOA_K        = 4,
  parameter int DOA_L        = 2,
  parameter int DOA_AVG_LOG2 = 6,
  localparam int EVD_N       = 2 * DOA_K,
  localparam int EVD_W       = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // MRC beamforming receiver
  input  logic                     adc_valid,
  input  logic [ADC_W-1:0]         adc1,
  input  logic [ADC_W-1:0]         adc2,
  output logic                     bb_valid,
  output cplx_iq_t                 bb1,
  output cplx_iq_t                 bb2,
  output logic                     w_valid,
  output mrc_weights_t             w,
  output logic                     y_valid,
  output cplx_y_t                  y,
  input  logic                     mrc_cal_start,
  input  logic                     mrc_cal_en,
  output logic                     mrc_cal_busy,
  output logic                     mrc_cal_valid,
  // MUSIC direction finder
  input  logic                     doa_adc_valid,
  input  logic [ADC_W-1:0]         doa_adc [DOA_K],
  input  logic [15:0]              doa_cal_phase [DOA_K],
  input  logic [15:0]              doa_cal_amp [DOA_K],
  input  logic                     doa_smooth_en,
  input  logic                     doa_start,
  output logic                     doa_busy,
  output logic                     doa_done,
  output logic                     spec_valid,
  output logic signed [7:0]        spec_angle,
  output logic [31:0]              spec_den,
  output logic                     doa_found [DOA_L],
  output logic signed [7:0]        doa_deg [DOA_L],
  // EVD processor host port
  input  logic                     evd_start,
  output logic                     evd_busy,
  output logic                     evd_done,
  input  logic                     evd_ld_en,
  input  logic [$clog2(EVD_N)-1:0] evd_ld_row,
  input  logic signed [EVD_W-1:0]  evd_ld_data [EVD_N],
  input  logic                     evd_rd_en,
  input  evd_mat_e                 evd_rd_mat,
  input  logic [$clog2(EVD_N)-1:0] evd_rd_row,
  output logic                     evd_rd_valid,
  output logic signed [EVD_W-1:0]  evd_rd_data [EVD_N]
);

  // ---------------- beamforming receiver ----------------
  mrc_receiver u_mrc (
    .clk, .rst_n, .in_valid(adc_valid), .adc1, .adc2,
    .bb_valid, .bb1, .bb2, .w_valid, .w, .y_valid, .y,
    .cal_start(mrc_cal_start), .cal_en(mrc_cal_en),
    .cal_busy(mrc_cal_busy), .cal_valid(mrc_cal_valid)
  );

  // ---------------- MUSIC direction finder ----------------
  logic                     dbb_valid [DOA_K];
  cplx_iq_t                 dbb [DOA_K];
  logic                     corr_busy, corr_row_valid;
  logic [$clog2(EVD_N)-1:0] corr_row_idx;
  logic signed [EVD_W-1:0]  corr_row [EVD_N];
  logic                     chain_start_evd, chain_evd, chain_music;
  logic                     music_start, music_busy, music_done;
  logic                     music_rd_en;
  evd_mat_e                 music_rd_mat;
  logic [$clog2(EVD_N)-1:0] music_rd_row;
  logic signed [EVD_W-1:0]  evd_ld_mux [EVD_N];
  logic                     ss_busy, ss_valid, ss_last;
  logic [$clog2(EVD_N)-1:0] ss_idx;
  logic signed [EVD_W-1:0]  ss_row [EVD_N];

  for (genvar k = 0; k < DOA_K; k++) begin : g_ddc
    qcd_cal_channel u_ddc (
      .clk, .rst_n, .in_valid(doa_adc_valid), .adc_data(doa_adc[k]),
      .cal_phase(doa_cal_phase[k]), .cal_amp(doa_cal_amp[k]),
      .out_valid(dbb_valid[k]), .bb(dbb[k])
    );
  end

  corr_matrix #(.K(DOA_K), .OUT_W(EVD_W), .AVG_LOG2(DOA_AVG_LOG2)) u_corr (
    .clk, .rst_n, .start(doa_start), .in_valid(dbb_valid[0]), .x(dbb),
    .busy(corr_busy), .row_valid(corr_row_valid), .row_idx(corr_row_idx),
    .row_data(corr_row), .done()
  );

  spatial_smoothing #(.K(DOA_K), .M(DOA_K), .W(EVD_W)) u_ss (
    .clk, .rst_n, .en(doa_smooth_en),
    .in_valid(corr_row_valid), .in_idx(corr_row_idx), .in_row(corr_row),
    .busy(ss_busy), .out_valid(ss_valid), .out_idx(ss_idx), .out_row(ss_row),
    .out_last(ss_last)
  );

  // Chain sequencing: correlation -> smoothing -> EVD -> spectrum.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chain_start_evd <= 1'b0;
      chain_evd       <= 1'b0;
      chain_music     <= 1'b0;
    end else begin
      chain_start_evd <= ss_last;
      if (ss_last)                  chain_evd <= 1'b1;
      else if (evd_done)            chain_evd <= 1'b0;
      if (doa_start)                chain_music <= 1'b0;
      else if (evd_done && chain_evd) chain_music <= 1'b1;
      else if (music_done)          chain_music <= 1'b0;
    end
  end
  assign music_start = evd_done && chain_evd;

  // Smoothed rows take the load port over from the host.
  always_comb begin
    for (int j = 0; j < EVD_N; j++)
      evd_ld_mux[j] = ss_valid ? ss_row[j] : evd_ld_data[j];
  end

  evd_processor #(.N(EVD_N), .W(EVD_W), .SWEEPS(EVD_SWEEPS)) u_evd (
    .clk, .rst_n,
    .start(evd_start || chain_start_evd), .busy(evd_busy), .done(evd_done),
    .ld_en(ss_valid || evd_ld_en),
    .ld_row(ss_valid ? ss_idx : evd_ld_row),
    .ld_data(evd_ld_mux),
    .rd_en(music_busy ? music_rd_en : evd_rd_en),
    .rd_mat(music_busy ? music_rd_mat : evd_rd_mat),
    .rd_row(music_busy ? music_rd_row : evd_rd_row),
    .rd_valid(evd_rd_valid), .rd_data(evd_rd_data)
  );

  music_spectrum #(.K(DOA_K), .L(DOA_L), .W(EVD_W)) u_music (
    .clk, .rst_n, .start(music_start), .busy(music_busy), .done(music_done),
    .rd_en(music_rd_en), .rd_mat(music_rd_mat), .rd_row(music_rd_row),
    .rd_valid(evd_rd_valid), .rd_data(evd_rd_data),
    .spec_valid, .spec_angle, .spec_den, .doa_found, .doa_deg
  );

  assign doa_busy = corr_busy || ss_busy || ss_valid || chain_start_evd || chain_evd || chain_music || music_busy;
  assign doa_done = music_done;

endmodule
