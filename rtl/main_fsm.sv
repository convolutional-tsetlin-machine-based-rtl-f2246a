// main_fsm: main state machine of the accelerator.
//
// After 'start' it streams num_samples samples from the selected dataset RAM
// through the patch generator, num_epochs times when training (once for
// inference). Every sample takes a fixed slot of P clocks:
//   inference: P = B = 9; a new image enters the patch generator in the
//              cycle of the previous image's last patch, so images follow
//              each other without wait states;
//   training:  P = B + 6 + M = 55; patches in phases 0..8, the adder tree
//              fills in phases 9..14 and clause j is updated in phase 15+j.
// The next sample is loaded in the last phase of the current slot. The RAM
// address runs one sample ahead, so read data is ready when it is loaded.
// After the last sample an inference session drains the 7-cycle sum
// pipeline before done_o pulses; a training session ends when the last
// clause update is written. train_o is the clock enable of the training-only
// logic (reservoirs, LFSR bank) and eval_o that of the evaluation counter.
// Slot lengths follow the source; the host handshake (start pulse, busy
// level, done pulse) is this design's choice.
module main_fsm
  import ctm_pkg::*;
#(
  parameter int M      = NCLAUSE,
  parameter int AW     = 13,      // sample address width (8192 test samples)
  parameter int EW     = 16       // epoch counter width
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 mode_train,
  input  logic [AW:0]          num_samples,
  input  logic [EW-1:0]        num_epochs,
  output logic [AW-1:0]        ram_addr_o,
  output logic                 load_o,        // load patch generator from RAM data
  output logic                 train_o,
  output logic                 eval_o,
  output logic                 clear_o,       // start of session
  output logic                 upd_active_o,
  output logic [$clog2(M)-1:0] upd_clause_o,
  output logic                 busy_o,
  output logic                 done_o
);

  localparam int P_INF   = NPATCH;
  localparam int P_TRAIN = NPATCH + ADD_STAGES + M;
  localparam int UPD0    = NPATCH + ADD_STAGES;
  localparam int DRAIN   = ADD_STAGES + 2;
  localparam int PHW     = $clog2(P_TRAIN);

  typedef enum logic [2:0] {S_IDLE, S_PRIME, S_RUN, S_DRAIN, S_DONE} state_e;

  state_e         state;
  logic           train_q;
  logic [PHW-1:0] phase;
  logic [PHW-1:0] last_phase;
  logic [AW:0]    sample_cnt;
  logic [EW-1:0]  epoch_cnt;
  logic           all_loaded;
  logic           have_sample;
  logic [3:0]     drain_cnt;

  assign last_phase = train_q ? PHW'(P_TRAIN - 1) : PHW'(P_INF - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      train_q     <= 1'b0;
      phase       <= '0;
      sample_cnt  <= '0;
      epoch_cnt   <= '0;
      all_loaded  <= 1'b0;
      have_sample <= 1'b0;
      drain_cnt   <= '0;
      ram_addr_o  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          train_q     <= mode_train;
          ram_addr_o  <= '0;
          sample_cnt  <= '0;
          epoch_cnt   <= '0;
          all_loaded  <= 1'b0;
          have_sample <= 1'b0;
          state       <= (num_samples == '0 || (mode_train && num_epochs == '0))
                         ? S_DONE : S_PRIME;
        end
        S_PRIME: begin
          // RAM reads address 0 in this cycle; the first load follows
          phase <= train_q ? PHW'(P_TRAIN - 1) : PHW'(P_INF - 1);
          state <= S_RUN;
        end
        S_RUN: begin
          phase <= (phase == last_phase) ? '0 : phase + PHW'(1);
          if (phase == last_phase) begin
            if (!all_loaded) begin
              have_sample <= 1'b1;
              if (sample_cnt == num_samples - 1'b1) begin
                sample_cnt <= '0;
                ram_addr_o <= '0;
                if (!train_q || epoch_cnt == num_epochs - 1'b1) all_loaded <= 1'b1;
                else                                            epoch_cnt  <= epoch_cnt + 1'b1;
              end else begin
                sample_cnt <= sample_cnt + 1'b1;
                ram_addr_o <= ram_addr_o + 1'b1;
              end
            end else if (train_q) begin
              state <= S_DONE;
            end else begin
              drain_cnt <= 4'(DRAIN);
              state     <= S_DRAIN;
            end
          end
        end
        S_DRAIN: begin
          drain_cnt <= drain_cnt - 4'd1;
          if (drain_cnt == 4'd1) state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign load_o       = (state == S_RUN) && (phase == last_phase) && !all_loaded;
  assign busy_o       = (state != S_IDLE);
  assign done_o       = (state == S_DONE);
  assign clear_o      = (state == S_IDLE) && start;
  assign train_o      = train_q && (state == S_RUN || state == S_PRIME);
  assign eval_o       = !train_q;
  assign upd_active_o = train_q && (state == S_RUN) && have_sample &&
                        (phase >= PHW'(UPD0));
  assign upd_clause_o = $clog2(M)'(phase - PHW'(UPD0));

endmodule
