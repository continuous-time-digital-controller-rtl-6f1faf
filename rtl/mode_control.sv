// Mode control: hands the switch between the PID/DPWM loop and the CT-DSP.
//
// In PID mode the error code e*(t) is watched without waiting for a clock
// edge of the switching period: as soon as |e| reaches ENTER_LEVEL
// quantisation steps, the controller enters dynamic mode (mode = m(t) = 1),
// records the transient type (dip when e > 0, i.e. the output fell) and
// signals `enter` so the sequence generator sets or resets the switch on the
// same clock edge that raises m(t). `enter` and, while in PID mode, `dip` are
// combinational (they announce the coming edge); `mode` and `dip` in
// dynamic mode are registered.
// Dynamic mode ends when the optimal switching sequence is complete
// (`seq_done`), and the PID resumes. The CT-DSP is then re-armed only after
// the output is back within ENTER_LEVEL steps of the reference, so one
// transient triggers one sequence. A TIMEOUT (clocks) in dynamic mode returns
// to PID mode if no sequence completes, a safeguard of this design.
// `enable` low keeps the controller in PID mode. Outputs are registered.
module mode_control
  import ctdc_pkg::*;
#(
  parameter int unsigned ENTER_LEVEL = 2,
  parameter int unsigned TIMEOUT     = 2048
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  err_t err,
  input  logic seq_done,
  output logic mode,
  output logic dip,
  output logic enter,
  output logic timed_out
);

  typedef enum logic [1:0] {ARMED, DYNAMIC, REARM} state_e;

  state_e state;
  logic [$clog2(TIMEOUT+1)-1:0] cnt;
  logic big, dip_q;

  assign big = (err >= err_t'(ENTER_LEVEL)) || (err <= -err_t'(ENTER_LEVEL));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ARMED;
      cnt       <= '0;
      dip_q     <= 1'b0;
      timed_out <= 1'b0;
    end else begin
      timed_out <= 1'b0;
      case (state)
        ARMED: if (enter) begin
          state <= DYNAMIC;
          dip_q <= (err > 0);
          cnt   <= '0;
        end
        DYNAMIC: begin
          cnt <= cnt + 1'b1;
          if (seq_done) begin
            state <= REARM;
          end else if (cnt == ($bits(cnt))'(TIMEOUT - 1)) begin
            state     <= REARM;
            timed_out <= 1'b1;
          end
        end
        default: if (!big) state <= ARMED;
      endcase
    end
  end

  assign enter = (state == ARMED) && enable && big;
  assign dip   = (state == ARMED) ? (err > 0) : dip_q;
  assign mode  = (state == DYNAMIC);

endmodule
