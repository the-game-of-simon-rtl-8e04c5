// simon_ref_pkg: reference model of the Simon game controller, used by the
// testbenches to predict next state and outputs independently of the RTL.
// State codes are spelled out as plain numbers here on purpose.
package simon_ref_pkg;

  localparam logic [3:0] R_WIN = 4'd0, R_PRE = 4'd1, R_OUT = 4'd2, R_POST = 4'd3,
                         R_IN  = 4'd4, R_CHK = 4'd5, R_CWIN = 4'd6, R_START = 4'd7,
                         R_LOSE = 4'd8;

  // Expected controller outputs, packed in one struct for easy comparison.
  typedef struct packed {
    logic [2:0] cheat;
    logic       scoreinc, curr_posinc, resetcurr_pos, write_en, read_en, input_en;
    logic       r, g, b, y;
  } ref_out_t;

  function automatic logic [3:0] ref_next(input logic [3:0] s, input logic reset,
                                          input int score, input int pos,
                                          input logic [2:0] btn, input logic [1:0] mem,
                                          input int max_stages);
    if (reset) return R_START;
    case (s)
      R_START: return R_PRE;
      R_PRE:   return R_OUT;
      R_OUT:   return (score == pos) ? R_POST : R_OUT;
      R_POST:  return R_IN;
      R_IN:    return btn[2] ? R_CHK : R_IN;
      R_CHK:   return (btn[1:0] == mem) ? R_CWIN : R_LOSE;
      R_CWIN:  return (score != pos) ? R_IN : ((score == max_stages) ? R_WIN : R_START);
      R_LOSE:  return R_LOSE;
      R_WIN:   return R_WIN;
      default: return R_START;
    endcase
  endfunction

  function automatic ref_out_t ref_outputs(input logic [3:0] s, input logic [1:0] mem,
                                           input int score, input int pos);
    ref_out_t o = '0;
    case (s)
      R_START: o.write_en = 1;
      R_PRE:   begin o.scoreinc = 1; o.resetcurr_pos = 1; end
      R_OUT:   if (pos != score) begin
                 o.curr_posinc = 1; o.read_en = 1;
                 o.r = (mem == 0); o.b = (mem == 1); o.g = (mem == 2); o.y = (mem == 3);
               end
      R_POST:  o.resetcurr_pos = 1;
      R_IN:    begin o.read_en = 1; o.input_en = 1; o.cheat = {1'b1, mem}; end
      R_CHK:   begin o.read_en = 1; o.input_en = 1; o.curr_posinc = 1; end
      R_LOSE:  begin o.r = 1; o.g = 1; end
      R_WIN:   begin o.r = 1; o.g = 1; o.b = 1; o.y = 1; end
      default: ;
    endcase
    return o;
  endfunction

endpackage
