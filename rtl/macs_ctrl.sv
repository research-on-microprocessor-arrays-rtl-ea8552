// Array controller: starts and stops the lockstep execution of the PEs.
//
// On `start` (while idle) it spends one cycle in restart, which returns every
// PE's sequencer to microinstruction 0 and re-enables it and rewinds the
// working-memory pointers, then steps the array for `n_mcycles` microcycles
// of NSLOT (16) microinstructions each, publishing the slot number inside the
// current microcycle, and finally pulses `done` and goes idle. n_mcycles = 0
// runs nothing. All outputs are registered or decoded from registers.
// The microcycle of 16 microinstructions follows the report; the report only
// names a control unit, so its start/stop protocol is this design's.
module macs_ctrl
  import macs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [15:0]       n_mcycles,
  output logic              step,
  output logic              restart,
  output logic [SLOT_W-1:0] slot,
  output logic [15:0]       mcycle,
  output logic              busy,
  output logic              done
);
  typedef enum logic [1:0] {S_IDLE, S_RESTART, S_RUN} state_e;
  state_e      st;
  logic [15:0] target;

  assign step    = (st == S_RUN);
  assign restart = (st == S_RESTART);
  assign busy    = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; slot <= '0; mcycle <= '0; target <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          target <= n_mcycles;
          slot   <= '0;
          mcycle <= '0;
          st     <= S_RESTART;
        end
        S_RESTART: begin
          if (target == '0) begin st <= S_IDLE; done <= 1'b1; end
          else              st <= S_RUN;
        end
        default: begin
          slot <= slot + 1'b1;
          if (slot == SLOT_W'(NSLOT-1)) begin
            mcycle <= mcycle + 1'b1;
            if (mcycle + 1'b1 == target) begin
              st   <= S_IDLE;
              done <= 1'b1;
            end
          end
        end
      endcase
    end
  end

endmodule
