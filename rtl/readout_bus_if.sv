// readout_bus_if: sender on the shared, token-arbitrated backplane readout bus.
//
// The modules of the crate share one 36-bit readout bus towards the readout
// driver; the right to drive it is passed around as a token. When this module
// receives the token (token_in, one-clock pulse) it waits, if necessary,
// until the readout FIFO holds at least one complete event, then drives that
// event word by word (ro_valid and ro_oe high, one word per clock, popping the
// FIFO; the bus outputs are registered, one clock behind the pop), and after the trailer word passes the token on (token_out, one-clock
// pulse) and releases the bus. ev_pushed pulses for every trailer written
// into the FIFO, so the module knows how many whole events it holds.
//
// The document says the bus is shared, 36 bits wide, and arbitrated by token
// passing; the exact handshake (pulsed token, one event per token, holding
// the token until an event is complete) is this design's assumption.
module readout_bus_if
  import mioct_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [RO_W-1:0] fifo_dout,
  input  logic            fifo_empty,
  output logic            fifo_pop,
  input  logic            ev_pushed,
  input  logic            token_in,
  output logic            token_out,
  output logic [RO_W-1:0] ro_data,
  output logic            ro_valid,
  output logic            ro_oe
);

  typedef enum logic [1:0] {B_IDLE, B_HOLD, B_SEND} bstate_e;
  bstate_e state;
  logic [7:0] nev;     // complete events in the FIFO
  logic ev_sent;

  assign fifo_pop = (state == B_SEND) && !fifo_empty;
  assign ev_sent  = fifo_pop && (fifo_dout[RO_W-1 -: 3] == RO_TRAILER);

  // Bus outputs are registered: each popped word is driven one clock later.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ro_oe    <= 1'b0;
      ro_valid <= 1'b0;
      ro_data  <= '0;
    end else begin
      ro_oe    <= (state == B_SEND);
      ro_valid <= fifo_pop;
      ro_data  <= fifo_pop ? fifo_dout : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) nev <= '0;
    else        nev <= nev + 8'(ev_pushed) - 8'(ev_sent);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= B_IDLE;
      token_out <= 1'b0;
    end else begin
      token_out <= 1'b0;
      case (state)
        B_IDLE: if (token_in) state <= B_HOLD;
        B_HOLD: if (nev != '0) state <= B_SEND;
        B_SEND: if (ev_sent) begin
          state     <= B_IDLE;
          token_out <= 1'b1;
        end
        default: state <= B_IDLE;
      endcase
    end
  end

  a_token_only_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    token_in |-> state == B_IDLE);

endmodule
