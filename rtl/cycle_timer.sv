// cycle_timer: measures how many clocks an operation takes.
//
// A start pulse clears the count and starts counting; the count then rises
// by one every clock until a stop pulse, after which it holds its value
// (the measured duration) until the next start. running is high while it
// counts. The count saturates at its maximum instead of wrapping. With
// start at clock t and stop at clock t+n, count reads n afterwards.
//
// The document's engines contain a timer unit that times their operations
// and reports the processing time of each image part; it gives no insides,
// so this is the simplest counter that does that.
module cycle_timer #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic         stop,
  output logic         running,
  output logic [W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      count   <= '0;
    end else if (start) begin
      running <= 1'b1;
      count   <= W'(1);
    end else if (running) begin
      if (stop) running <= 1'b0;
      else if (count != '1) count <= count + W'(1);
    end
  end

endmodule
