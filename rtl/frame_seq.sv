// frame_seq: sequencer shared by the four frame generators.
//
// A start pulse while idle raises busy and req (the request to mux4_1).
// Once the multiplexer answers with select, the sequencer counts byte
// positions idx = 0..LEN-1, one per ce (the half-rate byte strobe), with en
// high while a byte is presented. After the last byte req, en and busy fall
// together. The generator turns idx into the byte value combinationally;
// a consumer samples data and en on ce edges.
// The request/select/byte-enable handshake follows the documentation's
// generator ports; sharing one sequencer among them is this design's choice.
module frame_seq #(
  parameter int unsigned LEN = 60,
  localparam int unsigned IW = $clog2(LEN + 1)
) (
  input  logic          clk,
  input  logic          ce,
  input  logic          reset,
  input  logic          start,
  input  logic          select,
  output logic          busy,
  output logic          req,
  output logic          en,
  output logic [IW-1:0] idx
);
  typedef enum logic [1:0] {F_IDLE, F_REQ, F_SEND} fstate_e;
  fstate_e st;

  always_ff @(posedge clk) begin
    if (reset) begin
      st  <= F_IDLE;
      idx <= '0;
    end else begin
      case (st)
        F_IDLE: if (start) st <= F_REQ;
        F_REQ:  if (ce && select) begin st <= F_SEND; idx <= '0; end
        F_SEND: if (ce) begin
          if (idx == IW'(LEN - 1)) st <= F_IDLE;
          idx <= idx + 1'b1;
        end
        default: st <= F_IDLE;
      endcase
    end
  end

  assign busy = (st != F_IDLE);
  assign req  = (st != F_IDLE);
  assign en   = (st == F_SEND);
endmodule
