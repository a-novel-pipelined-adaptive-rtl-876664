// demosaic_controller: finite state machine that paces the interpolation
// pipeline and keeps track of where in the frame the window is.
//
// The whole datapath moves one step (`adv`) per accepted pixel, so one
// pixel in gives one RGB pixel out. Two states:
//   ST_RUN   - `in_ready` is high; the pipeline advances on every cycle
//              with `in_valid` and stalls (holds every register) otherwise.
//              After the last pixel of an IMG_W x IMG_H frame it moves to
//   ST_FLUSH - input is refused and the pipeline advances on its own for
//              IMG_W + 2 + PIPE_TAIL cycles, pushing the last row and a half
//              of the frame out of the window and the pipeline. It then
//              returns to ST_RUN for the next frame.
// The window centre lags the newest input by one row and two columns, so
// the controller starts its centre counter at the (IMG_W+2)-th step of the
// frame and from then on reports, in `centre`, the frame position of the
// sample that is now at the middle of the register-bank window (valid
// until the whole frame has passed). The datapath carries this tag along
// with the data, and uses it for border handling and for the output colour
// selection.
//
// Timing: `adv` is combinational from `in_valid` and the state; `centre`
// and the state change on the clock edge where `adv` is high.
// The source says only that the controller is a finite state machine that
// handles the interpolation flow and matches pixel-in to pixel-out; the
// states, the flush and the position tracking are this design's choices.
module demosaic_controller
  import demosaic_pkg::*;
#(
  parameter int unsigned IMG_W     = 1920,
  parameter int unsigned IMG_H     = 1080,
  parameter int unsigned PIPE_TAIL = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  output logic adv,
  output logic flushing,
  output pos_t centre
);
  typedef enum logic {ST_RUN = 1'b0, ST_FLUSH = 1'b1} state_e;

  localparam int unsigned NPIX      = IMG_W * IMG_H;
  localparam int unsigned LAG       = IMG_W + 2;
  localparam int unsigned FLUSH_LEN = LAG + PIPE_TAIL;

  state_e      state;
  logic [31:0] adv_idx;     // steps taken so far in this frame

  assign in_ready = (state == ST_RUN);
  assign flushing = (state == ST_FLUSH);
  assign adv      = (state == ST_FLUSH) || in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_RUN;
      adv_idx <= '0;
      centre  <= '0;
    end else if (adv) begin
      // frame sequencing
      if (adv_idx == 32'(NPIX + FLUSH_LEN - 1)) begin
        state   <= ST_RUN;
        adv_idx <= '0;
      end else begin
        if (adv_idx == 32'(NPIX - 1)) state <= ST_FLUSH;
        adv_idx <= adv_idx + 1'b1;
      end
      // position of the window centre after this step
      if (adv_idx == 32'(LAG)) begin
        centre <= '{valid: 1'b1, row: '0, col: '0};
      end else if (centre.valid) begin
        if (centre.col == POS_W'(IMG_W - 1)) begin
          centre.col <= '0;
          centre.row <= centre.row + 1'b1;
          if (centre.row == POS_W'(IMG_H - 1)) centre.valid <= 1'b0;
        end else begin
          centre.col <= centre.col + 1'b1;
        end
      end
    end
  end

  initial assert (IMG_H >= 2 && IMG_W >= 6 && IMG_W < (1 << POS_W) && IMG_H < (1 << POS_W))
    else $error("demosaic_controller: unsupported frame size");
endmodule
