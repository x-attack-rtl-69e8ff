// xattack_protection: lightweight timing-fault detector that disconnects
// the victim's output while an attack slows the fabric down.
//
// A toggle flip-flop (cleared by reset) sends its output through a chain of
// N_BUF buffers to a second flip-flop (preset by reset). With correct
// timing the second flip-flop always holds the previous value of the
// first, so the two differ and valid = q_tog ^ q_chk is 1; data_o then
// equals data_i. The chain is sized to be slightly longer than the
// victim's critical path, so a voltage drop makes it fail first: the
// second flip-flop captures a stale value, the two agree, valid drops,
// data_o is forced to zero and alarm is raised for that cycle. The
// flip-flop pair, the buffer chain, the zero output and the alarm follow
// the countermeasure description (15 buffers in its tested set-up); the
// explicit alarm port and the active-high asynchronous reset are this
// design's choices. Timing: valid, alarm and data_o are combinational
// from the two flip-flops and data_i; data_i should be a registered output
// of the protected core. The buffers carry keep attributes so that
// synthesis leaves the chain in place; in simulation it has no delay.
module xattack_protection #(
  parameter int unsigned W     = 128,  // width of the protected output
  parameter int unsigned N_BUF = 15    // buffers in the delay chain
) (
  input  logic         clk,
  input  logic         rst,      // asynchronous, active high
  input  logic [W-1:0] data_i,   // output of the protected core
  output logic [W-1:0] data_o,   // data_i while valid, zero otherwise
  output logic         valid,
  output logic         alarm     // timing fault detected this cycle
);
  logic q_tog, q_chk;
  (* keep *) logic [N_BUF:0] chain;
  logic chain_out;   // end of the delay chain, input of the check flip-flop

  always_ff @(posedge clk or posedge rst) begin
    if (rst) q_tog <= 1'b0;
    else     q_tog <= ~q_tog;
  end

  assign chain[0] = q_tog;
  for (genvar i = 0; i < N_BUF; i++) begin : g_buf
    assign chain[i+1] = chain[i];
  end

  assign chain_out = chain[N_BUF];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) q_chk <= 1'b1;
    else     q_chk <= chain_out;
  end

  assign valid  = q_tog ^ q_chk;
  assign alarm  = ~valid;
  assign data_o = valid ? data_i : '0;
endmodule
