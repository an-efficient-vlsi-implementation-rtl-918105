// mmm_ctrl: control unit of the radix-2 Montgomery multiplier.
//
// On start (accepted only when idle) it loads the multiplier operand A into
// a shift register and runs for exactly K clocks. During iteration i it
// presents bit a_i of A on a_bit (LSB first) with step high; last marks
// iteration K-1. done pulses for one clock after the last iteration, K+1
// clocks after the start pulse, and busy is high from the clock after start
// up to and including the last iteration. The source design shows a control
// unit that takes A and the clock and hands single bits of A to the
// datapath; its counter and handshake are this design's choices.
module mmm_ctrl #(
  parameter int unsigned K  = 256,
  parameter int unsigned CW = $clog2(K)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K-1:0] a,
  output logic         load,   // start accepted: datapath loads its operands
  output logic         step,   // one iteration happens this clock
  output logic         a_bit,  // a_i for this iteration
  output logic         last,   // this iteration is the final one
  output logic         busy,
  output logic         done
);
  logic [K-1:0]  a_sr;
  logic [CW-1:0] cnt;

  assign load  = start && !busy;
  assign step  = busy;
  assign a_bit = a_sr[0];
  assign last  = busy && (cnt == CW'(K - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_sr <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= last;
      if (load) begin
        a_sr <= a;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        a_sr <= a_sr >> 1;
        cnt  <= cnt + CW'(1);
        if (last) busy <= 1'b0;
      end
    end
  end
endmodule
