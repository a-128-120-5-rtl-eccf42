// reset_sync: reset synchroniser for the power-on reset.
// rst_n_o follows a low on rst_n_i at once (asynchronous assertion) and is
// released two clock edges after rst_n_i rises, synchronously to clk.
module reset_sync (
  input  logic clk,
  input  logic rst_n_i,
  output logic rst_n_o
);

  logic [1:0] sync_q;

  always_ff @(posedge clk or negedge rst_n_i) begin
    if (!rst_n_i) sync_q <= '0;
    else          sync_q <= {sync_q[0], 1'b1};
  end

  assign rst_n_o = sync_q[1];

endmodule
