// serial_divider: multi-cycle unsigned integer divider.
//
// Computes quotient = floor(dividend / divisor) by restoring division, one
// quotient bit per cycle. DVM needs the ratio of waiting to ready
// instructions, an integer division the document schedules once every 50
// cycles; a W-cycle serial divider fits that budget with one subtractor. The
// divider structure is this design's own. A divisor of zero returns all ones
// (the ratio is taken as maximal) unless the dividend is zero too: 0/0 = 0,
// so that an empty issue queue never counts as having too many waiting
// instructions.
//
// Interface: pulse `start` with the operands (ignored while busy). `done`
// pulses W cycles later, with `quotient` valid from then until the next start.
module serial_divider #(
  parameter int unsigned W = 8,
  localparam int unsigned CW = $clog2(W + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient
);

  logic [W-1:0]  rem_q, dvs_q, quo_q;
  logic [CW-1:0] cnt_q;
  logic          zero_q, empty_q;
  logic [W:0]    trial;

  // Shift the next dividend bit into the partial remainder and try to subtract.
  assign trial = {rem_q, quo_q[W-1]} - {1'b0, dvs_q};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      cnt_q <= '0;
      rem_q <= '0;
      dvs_q <= '0;
      quo_q <= '0;
      zero_q <= 1'b0;
      empty_q <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          cnt_q  <= CW'(W);
          rem_q  <= '0;
          dvs_q  <= divisor;
          quo_q  <= dividend;   // dividend bits shift out as quotient bits shift in
          zero_q  <= (divisor == '0);
          empty_q <= (dividend == '0);
        end
      end else begin
        if (trial[W]) begin
          rem_q <= {rem_q[W-2:0], quo_q[W-1]};
          quo_q <= {quo_q[W-2:0], 1'b0};
        end else begin
          rem_q <= trial[W-1:0];
          quo_q <= {quo_q[W-2:0], 1'b1};
        end
        cnt_q <= cnt_q - CW'(1);
        if (cnt_q == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient = zero_q ? (empty_q ? '0 : '1) : quo_q;

endmodule
