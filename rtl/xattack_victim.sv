// xattack_victim: the victim tenant's region - an AES-128 encryption
// service whose core carries an SDC Trojan, guarded by the timing-fault
// protection circuit.
//
// The host writes plaintexts into the PT FIFO and reads ciphertexts from
// the CT FIFO. A block leaves the PT FIFO and enters the 11-cycle AES
// pipeline whenever the CT FIFO has room for it and for every block still
// in the pipeline (a credit count), so nothing is ever dropped; the host
// may therefore stall the core only by leaving the CT FIFO full. With
// PROTECTION = 1 the core output passes through xattack_protection: a
// timing fault in its delay chain replaces the ciphertext written to the
// CT FIFO by zero and raises alarm. With PROTECTION = 0 the core output
// goes to the CT FIFO unchanged. The FIFOs, the AES core and the protection
// placed beside the core follow the system description; the credit-based
// flow control and the port set are this design's choices.
module xattack_victim
  import xattack_pkg::*;
#(
  parameter int unsigned     PT_DEPTH   = 4096,
  parameter int unsigned     CT_DEPTH   = 4096,
  parameter trojan_variant_e VARIANT    = TROJAN_2,
  parameter bit              PROTECTION = 1'b1,
  parameter int unsigned     N_BUF      = 15
) (
  input  logic         clk,
  input  logic         rst,        // asynchronous, active high
  input  logic [127:0] key,        // secret key of the victim
  input  logic         pt_wr,      // host writes a plaintext
  input  logic [127:0] pt_data,
  output logic         pt_full,
  input  logic         ct_rd,      // host removes the oldest ciphertext
  output logic [127:0] ct_data,
  output logic         ct_empty,
  output logic         alarm       // protection saw a timing fault this cycle
);
  localparam int unsigned CW  = $clog2(CT_DEPTH + 1);
  localparam int unsigned LAT = AES_ROUNDS + 1;
  localparam int unsigned IW  = $clog2(LAT + 2);

  logic         pt_empty;
  logic [127:0] pt_head;
  logic [$clog2(PT_DEPTH+1)-1:0] pt_count;
  logic [CW-1:0] ct_count;
  logic         ct_full;
  logic         issue;
  logic [IW-1:0] inflight;
  logic         aes_valid;
  logic [127:0] aes_ct, out_data;

  sync_fifo #(.WIDTH(128), .DEPTH(PT_DEPTH)) u_pt_fifo (
    .clk, .rst, .wr_en(pt_wr), .wr_data(pt_data), .rd_en(issue), .rd_data(pt_head),
    .full(pt_full), .empty(pt_empty), .count(pt_count));

  // Credit check: the CT FIFO must hold everything already in the pipeline.
  assign issue = !pt_empty && ((32'(ct_count) + 32'(inflight)) < CT_DEPTH);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) inflight <= '0;
    else     inflight <= inflight + IW'(issue) - IW'(aes_valid);
  end

  aes128_pipe #(.VARIANT(VARIANT)) u_aes (
    .clk, .rst, .in_valid(issue), .pt(pt_head), .key(key),
    .out_valid(aes_valid), .ct(aes_ct));

  if (PROTECTION) begin : g_prot
    logic prot_valid;
    xattack_protection #(.W(128), .N_BUF(N_BUF)) u_prot (
      .clk, .rst, .data_i(aes_ct), .data_o(out_data), .valid(prot_valid), .alarm(alarm));
  end else begin : g_noprot
    assign out_data = aes_ct;
    assign alarm    = 1'b0;
  end

  sync_fifo #(.WIDTH(128), .DEPTH(CT_DEPTH)) u_ct_fifo (
    .clk, .rst, .wr_en(aes_valid), .wr_data(out_data), .rd_en(ct_rd), .rd_data(ct_data),
    .full(ct_full), .empty(ct_empty), .count(ct_count));

  a_credit: assert property (@(posedge clk) disable iff (rst) !(aes_valid && ct_full));
endmodule
