// mode_table: the pre-defined mode switching table held by every node.
//
// Input is the measured result, the number of measurement packets the client
// received correctly out of N_MEAS sent, and the node's current payload
// modulation. The error count is N_MEAS - good. In QPSK, an error count below
// ERR_THRESH moves the link up to QAM-16 for more bandwidth; in QAM-16, an
// error count above ERR_THRESH moves it back down to QPSK. Otherwise, and for
// any other current mode, the mode is kept. Purely combinational.
// The two modes and the direction of each switch follow the original system; the
// threshold value is this design's choice, since the original gives none.
module mode_table
  import ms_pkg::*;
#(
  parameter int unsigned N_MEAS     = 2000,
  parameter int unsigned ERR_THRESH = 100
) (
  input  mod_e        cur_mode,
  input  logic [31:0] good_cnt,
  output mod_e        new_mode,
  output logic        change
);
  logic [31:0] errors;

  always_comb begin
    errors   = (good_cnt >= N_MEAS) ? 32'd0 : (N_MEAS - good_cnt);
    new_mode = cur_mode;
    case (cur_mode)
      MOD_QPSK:  if (errors <  ERR_THRESH) new_mode = MOD_QAM16;
      MOD_QAM16: if (errors >  ERR_THRESH) new_mode = MOD_QPSK;
      default:   new_mode = cur_mode;
    endcase
    change = (new_mode != cur_mode);
  end
endmodule
