// svm_ctrl: window sequencer of the unified SVM circuit.
//
// A start pulse in IDLE latches the window configuration (kernel_type,
// svnum, bias, gamma) and opens the input stream. In RUN the controller
// accepts one beat per cycle when in_valid and in_ready are both high,
// counts BEATS beats per support vector (34 for 3,780 dimensions at 112
// lanes) and the support vectors of the window: svnum in RBF mode, one
// (the weight vector) in linear mode. It marks the first and last beat of
// each vector pair, gives the number of live lanes of each beat (84 on the
// last one) and flags the first and last support vector. After the last
// beat it closes the stream (DRAIN) until the result leaves ACCUM_2, then
// returns to IDLE, so a window takes 36 cycles (linear) or
// 34*svnum + 6 cycles (RBF, 7,248 for 213 support vectors) from its first
// beat to its result when the source never stalls.
//
// beat_idx / sv_idx tell the source which slice it must present next. The
// beat and vector counts follow the published design; the handshake, the
// states and the configuration latching are this implementation's choice.
// svnum = 0 is treated as 1.
module svm_ctrl #(
  parameter int unsigned LANES   = svm_pkg::LANES,
  parameter int unsigned DIM     = svm_pkg::DIM,
  parameter int unsigned SVCNT_W = svm_pkg::SVCNT_W,
  parameter int unsigned DATA_W  = svm_pkg::DATA_W,
  parameter int unsigned GAMMA_W = svm_pkg::GAMMA_W,
  localparam int unsigned BEATS      = svm_pkg::beats_of(DIM, LANES),
  localparam int unsigned LAST_LANES = DIM - (BEATS - 1) * LANES,
  localparam int unsigned BEAT_W     = (BEATS > 1) ? $clog2(BEATS) : 1,
  localparam int unsigned NL_W       = $clog2(LANES + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // window configuration
  input  logic                      start,
  input  svm_pkg::kernel_type_e     cfg_kernel_type,
  input  logic [SVCNT_W-1:0]        cfg_svnum,
  input  logic signed [DATA_W-1:0]  cfg_bias,
  input  logic [GAMMA_W-1:0]        cfg_gamma,
  output logic                      busy,
  output svm_pkg::kernel_type_e     kernel_type,   // latched
  output logic signed [DATA_W-1:0]  bias,          // latched
  output logic [GAMMA_W-1:0]        gamma,         // latched
  // input stream
  input  logic                      in_valid,
  output logic                      in_ready,
  output logic [BEAT_W-1:0]         beat_idx,
  output logic [SVCNT_W-1:0]        sv_idx,
  // to the datapath
  output logic                      beat_valid,
  output logic                      beat_first,
  output logic                      beat_last,
  output logic [NL_W-1:0]           n_lanes,
  output logic                      first_sv,
  output logic                      last_sv,
  // from ACCUM_2
  input  logic                      d_valid
);

  typedef enum logic [1:0] {
    S_IDLE  = 2'd0,
    S_RUN   = 2'd1,
    S_DRAIN = 2'd2
  } state_e;

  state_e             state;
  logic [SVCNT_W-1:0] n_sv;     // support vectors in this window

  assign busy       = (state != S_IDLE);
  assign in_ready   = (state == S_RUN);
  assign beat_valid = in_valid && in_ready;
  assign beat_first = (beat_idx == '0);
  assign beat_last  = (beat_idx == BEAT_W'(BEATS - 1));
  assign n_lanes    = beat_last ? NL_W'(LAST_LANES) : NL_W'(LANES);
  assign first_sv   = (sv_idx == '0);
  assign last_sv    = (sv_idx == n_sv - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      n_sv        <= SVCNT_W'(1);
      beat_idx    <= '0;
      sv_idx      <= '0;
      kernel_type <= svm_pkg::KT_LINEAR;
      bias        <= '0;
      gamma       <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            kernel_type <= cfg_kernel_type;
            bias        <= cfg_bias;
            gamma       <= cfg_gamma;
            n_sv        <= (cfg_kernel_type == svm_pkg::KT_LINEAR || cfg_svnum == '0)
                           ? SVCNT_W'(1) : cfg_svnum;
            beat_idx    <= '0;
            sv_idx      <= '0;
            state       <= S_RUN;
          end
        end
        S_RUN: begin
          if (beat_valid) begin
            if (beat_last) begin
              beat_idx <= '0;
              if (last_sv) begin
                state <= S_DRAIN;
              end else begin
                sv_idx <= sv_idx + 1'b1;
              end
            end else begin
              beat_idx <= beat_idx + 1'b1;
            end
          end
        end
        S_DRAIN: begin
          if (d_valid) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A result can only leave ACCUM_2 while the window drains.
  a_result_in_drain : assert property (@(posedge clk) disable iff (!rst_n)
    d_valid |-> state == S_DRAIN);
  // Beats are only taken while the stream is open.
  a_beat_in_run : assert property (@(posedge clk) disable iff (!rst_n)
    beat_valid |-> state == S_RUN);

endmodule
