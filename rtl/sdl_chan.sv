// One SDL channel carried as a synchronous send/acknowledge handshake.
// The sender raises send with data; the word moves in the clock cycle in
// which send and ack are both high. Until then the sender must hold send
// high and data stable; the assertion below checks that rule.
// Ports: clk, rst_n (for the assertion). Modports: tx (sender), rx (receiver).
// The assertion's disable condition samples rst_n on the clock while the
// logic resets asynchronously; lint reports that double use of rst_n, which
// is intended and adds no hardware.
interface sdl_chan #(parameter int unsigned W = 32) (input logic clk, input logic rst_n);
  logic         send;
  logic         ack;
  logic [W-1:0] data;

  modport tx (output send, output data, input ack);
  modport rx (input send, input data, output ack);

  // A pending word is neither withdrawn nor changed before it is acknowledged.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           (send && !ack) |=> (send && $stable(data)))
    else $error("sdl_chan: send dropped or data changed before ack");
endinterface
