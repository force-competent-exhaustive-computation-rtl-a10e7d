// cs_ctrl: sequencer of the parallel Chien search.
//
// A search covers positions 1..N in blocks of P, so it takes NB = ceil(N/P)
// search cycles. On start (while idle) the controller asks for the
// coefficient registers to be loaded, then runs NB cycles in which the
// registers step and the first step of every row is enabled. Because the
// second step works one cycle later, the results of block w come out one
// cycle after block w was searched: out_valid/out_blk mark them, and done
// pulses with the last block. A new start is accepted in the cycle in which
// the last block comes out, so searches can follow back to back.
//
// Only the count of n/p iterations comes from the search itself; the
// start/done handshake is this design's own. Reset is active low and
// asynchronous.
module cs_ctrl #(
  parameter int unsigned N = 16383,
  parameter int unsigned P = 8,
  localparam int unsigned NB = (N + P - 1) / P,
  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  load,
  output logic                  step,
  output logic                  busy,
  output logic                  out_valid,
  output logic [BW-1:0]         out_blk,
  output logic                  done
);

  typedef enum logic [0:0] {S_IDLE, S_RUN} state_t;

  state_t        state;
  logic [BW-1:0] cnt;

  assign load = (state == S_IDLE) && start;
  assign step = (state == S_RUN);
  assign busy = (state == S_RUN) || out_valid;
  assign done = out_valid && (out_blk == BW'(NB - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_blk   <= '0;
    end else begin
      out_valid <= (state == S_RUN);
      out_blk   <= cnt;
      case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          cnt   <= '0;
        end
        S_RUN: begin
          if (cnt == BW'(NB - 1)) state <= S_IDLE;
          else                    cnt   <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
