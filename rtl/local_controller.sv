// local_controller: the central FSM of one AAC core unit (Fig. 6).
//
// States IDLE -> Do Demux -> Do IQ -> Do IMDCT -> Do Win_OV -> Do Demux ...
// On entering a Do state the controller pulses that module's start and
// stays while the module's busy is high; busy low moves it on, exactly the
// transitions printed in Fig. 6. Leaving Do Win_OV pulses frame_ready (the
// Frame Ready of Fig. 5) and returns to Do Demux, so a started core decodes
// frame after frame.
//
// This design's additions: the start of the demultiplexer in Do Demux waits
// for `start` from the global controller, which it holds high while the
// selected stream's FIFO holds a complete frame; a module's busy is only
// looked at from the cycle after its start pulse.
module local_controller (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic demux_busy,
  input  logic iq_busy,
  input  logic imdct_busy,
  input  logic winov_busy,
  output logic demux_start,
  output logic iq_start,
  output logic imdct_start,
  output logic winov_start,
  output logic frame_ready
);
  typedef enum logic [2:0] {S_IDLE, S_DEMUX, S_IQ, S_IMDCT, S_WINOV} state_t;
  state_t state;
  logic   launched;   // the current state's module has been started

  assign demux_start = (state == S_DEMUX) && !launched && start;
  assign iq_start    = (state == S_IQ)    && !launched;
  assign imdct_start = (state == S_IMDCT) && !launched;
  assign winov_start = (state == S_WINOV) && !launched;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; launched <= 1'b0; frame_ready <= 1'b0;
    end else begin
      frame_ready <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin state <= S_DEMUX; launched <= 1'b0; end
        S_DEMUX: begin
          if (!launched) launched <= start;
          else if (!demux_busy) begin state <= S_IQ; launched <= 1'b0; end
        end
        S_IQ: begin
          if (!launched) launched <= 1'b1;
          else if (!iq_busy) begin state <= S_IMDCT; launched <= 1'b0; end
        end
        S_IMDCT: begin
          if (!launched) launched <= 1'b1;
          else if (!imdct_busy) begin state <= S_WINOV; launched <= 1'b0; end
        end
        S_WINOV: begin
          if (!launched) launched <= 1'b1;
          else if (!winov_busy) begin
            state <= S_DEMUX; launched <= 1'b0; frame_ready <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
