// dsrc_enc_pkg: control encodings shared by the FM0 / Manchester / Miller
// line encoder and its testbenches.
//
// The encoder has three static control inputs. MODE selects the FM0 (0) or
// Manchester (1) branch of the SOLS core, CLR is an active-low clear of the
// storage elements that also doubles as part of the mode setting, and CS
// picks the output: the SOLS core (0) or the Miller T flip-flop (1). The
// FM0 and Miller settings below are the ones the design was specified
// with; the Manchester CS value (0) is this design's reading, because the
// Manchester code only exists on the SOLS core output.
`timescale 1ns / 1ps

package dsrc_enc_pkg;

  // Level of CLR that clears DFF B and the T flip-flop.
  localparam logic CLR_ACTIVE = 1'b0;

  // Value of CS that routes the Miller T flip-flop to the output.
  localparam logic CS_SEL_MILLER = 1'b1;

  // One complete control setting of the encoder.
  typedef struct packed {
    logic mode;   // 0: FM0 branch, 1: Manchester branch
    logic clr;    // active-low clear / initialisation
    logic cs;     // 0: SOLS core output, 1: Miller output
  } enc_ctrl_t;

  typedef enum logic [1:0] {
    CODE_FM0        = 2'd0,
    CODE_MANCHESTER = 2'd1,
    CODE_MILLER     = 2'd2
  } line_code_e;

  localparam enc_ctrl_t CTRL_FM0        = '{mode: 1'b0, clr: 1'b1, cs: 1'b0};
  localparam enc_ctrl_t CTRL_MANCHESTER = '{mode: 1'b1, clr: 1'b0, cs: 1'b0};
  localparam enc_ctrl_t CTRL_MILLER     = '{mode: 1'b0, clr: 1'b1, cs: 1'b1};

  // Control setting that produces a given line code.
  function automatic enc_ctrl_t ctrl_for(line_code_e code);
    case (code)
      CODE_FM0:        return CTRL_FM0;
      CODE_MANCHESTER: return CTRL_MANCHESTER;
      default:         return CTRL_MILLER;
    endcase
  endfunction

endpackage
