// update_sequencer: carries out the host's on-line update commands.
//
// Commands arrive with a valid/ready handshake (cmd_ready is 1 in the idle
// state; one command is taken per clock):
//   CMD_CAM_SET    load cmd.rule into the range-matching CAM (cam_set pulse)
//                  and raise busy; from now on the CAM answers for that rule.
//   CMD_LUT_WRITE  emit one write bubble {grp, tgt, stage, addr, data} for
//                  one clock on wb_out; the top injects it into the cascades
//                  in place of a lane-0 lookup.
//   CMD_CAM_CLEAR  wait DRAIN clocks so that every bubble already issued has
//                  reached its memory and every header looked up during the
//                  update has left the pipeline, then pulse cam_clear and
//                  update_done and drop busy.
// This follows the update sequence of CAM load, cascade rewrite, CAM clear;
// the command format and the drain wait are this design's own.
module update_sequencer
  import pc_pkg::*;
#(
  parameter int unsigned DRAIN = 40
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd_valid,
  output logic       cmd_ready,
  input  cmd_t       cmd,
  output wr_bubble_t wb_out,
  output logic       cam_set,
  output logic       cam_clear,
  output cam_rule_t  cam_rule,
  output logic       update_done,
  output logic       busy
);

  typedef enum logic {S_IDLE, S_DRAIN} state_e;

  localparam int unsigned CW = $clog2(DRAIN + 1) + 1;

  state_e        state;
  logic [CW-1:0] cnt;

  assign cmd_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cnt         <= '0;
      wb_out      <= '0;
      cam_set     <= 1'b0;
      cam_clear   <= 1'b0;
      cam_rule    <= '0;
      update_done <= 1'b0;
      busy        <= 1'b0;
    end else begin
      wb_out.valid <= 1'b0;
      cam_set      <= 1'b0;
      cam_clear    <= 1'b0;
      update_done  <= 1'b0;
      case (state)
        S_IDLE: begin
          if (cmd_valid) begin
            case (cmd.op)
              CMD_CAM_SET: begin
                cam_set  <= 1'b1;
                cam_rule <= cmd.rule;
                busy     <= 1'b1;
              end
              CMD_LUT_WRITE: begin
                wb_out.valid <= 1'b1;
                wb_out.grp   <= cmd.grp;
                wb_out.tgt   <= cmd.tgt;
                wb_out.stage <= cmd.stage;
                wb_out.addr  <= cmd.addr;
                wb_out.data  <= cmd.data;
              end
              CMD_CAM_CLEAR: begin
                state <= S_DRAIN;
                cnt   <= CW'(DRAIN);
              end
              default: ;
            endcase
          end
        end
        S_DRAIN: begin
          if (cnt == '0) begin
            cam_clear   <= 1'b1;
            update_done <= 1'b1;
            busy        <= 1'b0;
            state       <= S_IDLE;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
