// ncl_adder_env: synchronous operand/result interface for a dual-rail
// systolic adder (rncl_adder or dicsa_adder).
//
// Operand words enter through a valid/ready port and wait in a DEPTH-entry
// slot buffer. The module turns each operand bit (and the carry in) into a
// dual-rail DATA symbol followed by a NULL spacer, pacing every bit lane with
// the acknowledge the adder returns for it (ack = 1: DATA wanted, 0: NULL
// wanted). On the output side every sum lane and the carry-out lane capture
// their bit when it turns DATA and wait for it to return to NULL; the carry-out
// lane drives the adder's most significant request (req_msb). When all lanes
// of the oldest word are captured the word is presented on the result port.
//
// Two modes, selected by skew (change it only while no word is in flight):
//  * skew = 0, word-wise: all input lanes switch DATA -> NULL -> DATA together,
//    DATA only after every output lane has finished the previous word and NULL
//    only after every operand lane is acknowledged and every output captured.
//    One word is in the adder at a time.
//  * skew = 1, bit-skewed: each lane moves on as soon as its own acknowledge
//    allows, so a low-order bit can start the next word while high-order bits
//    still work on earlier ones (up to DEPTH words in flight). The per-lane
//    result registers undo the skew (output de-skew registration).
// The two application styles and the idea of de-skewing sum bits follow the
// source design; the slot buffer, the per-lane counters, the valid/ready ports
// and DEPTH are this implementation's own. Result latency is data dependent.
module ncl_adder_env
  import ncl_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         skew,
  // operand port
  input  logic         op_valid,
  output logic         op_ready,
  input  logic [N-1:0] op_a,
  input  logic [N-1:0] op_b,
  input  logic         op_cin,
  // result port
  output logic         res_valid,
  input  logic         res_ready,
  output logic [N-1:0] res_sum,
  output logic         res_cout,
  // dual-rail side, to the adder
  output dr_t  [N-1:0] a_dr,
  output dr_t  [N-1:0] b_dr,
  output dr_t          cin_dr,
  output logic         req_msb,
  input  logic [N-1:0] op_ack,   // operand acknowledge per bit
  input  logic         cin_ack,  // carry-in acknowledge
  input  dr_t  [N-1:0] s_dr,
  input  dr_t          cout_dr
);

  localparam int unsigned SW = (DEPTH > 1) ? $clog2(DEPTH) : 1;  // slot index width
  localparam int unsigned PW = SW + 1;                            // word counter width
  localparam int unsigned L  = N + 1;                             // lanes: N bits + carry

  typedef logic [PW-1:0] cnt_t;

  // operand and result storage
  logic [N-1:0] mem_a   [DEPTH];
  logic [N-1:0] mem_b   [DEPTH];
  logic         mem_cin [DEPTH];
  logic [L-1:0] mem_res [DEPTH];

  cnt_t wcnt, hcnt;                 // words written / retired
  cnt_t icnt [L];                   // per input lane: words fully issued
  logic iph  [L];                   // per input lane: 1 = presenting DATA
  cnt_t ocnt [L];                   // per output lane: words fully received
  logic oph  [L];                   // per output lane: 1 = captured, awaiting NULL

  logic [L-1:0] in_ack;             // lane acknowledges, carry lane on top
  dr_t  [L-1:0] out_dr;             // lane outputs, carry out on top

  assign in_ack = {cin_ack, op_ack};
  assign out_dr = {cout_dr, s_dr};

  function automatic logic [SW-1:0] slot(input cnt_t c);
    return SW'(c % PW'(DEPTH));
  endfunction

  // word counters wrap modulo 2*DEPTH (DEPTH must be a power of two)
  function automatic cnt_t inc(input cnt_t c);
    return c + 1'b1;
  endfunction

  function automatic cnt_t used(input cnt_t hi, input cnt_t lo);
    return hi - lo;
  endfunction

  // ---- word-mode barrier conditions --------------------------------------
  logic all_in_null, all_in_data, all_ack_hi, all_ack_lo;
  logic all_out_capt, all_out_idle, lanes_even;

  always_comb begin
    all_in_null  = 1'b1;
    all_in_data  = 1'b1;
    all_ack_hi   = 1'b1;
    all_ack_lo   = 1'b1;
    all_out_capt = 1'b1;
    all_out_idle = 1'b1;
    lanes_even   = 1'b1;
    for (int j = 0; j < L; j++) begin
      if (iph[j])        all_in_null  = 1'b0;
      if (!iph[j])       all_in_data  = 1'b0;
      if (!in_ack[j])    all_ack_hi   = 1'b0;
      if (in_ack[j])     all_ack_lo   = 1'b0;
      if (!oph[j])       all_out_capt = 1'b0;
      if (oph[j])        all_out_idle = 1'b0;
      if (icnt[j] != icnt[0] || ocnt[j] != icnt[0]) lanes_even = 1'b0;
    end
  end

  logic word_go_data, word_go_null;
  assign word_go_data = all_in_null && all_ack_hi && all_out_idle && lanes_even
                        && (icnt[0] != wcnt);
  assign word_go_null = all_in_data && all_ack_lo && all_out_capt;

  // ---- operand / result ports --------------------------------------------
  logic head_done;
  always_comb begin
    head_done = (hcnt != wcnt);
    for (int k = 0; k < L; k++)
      if (ocnt[k] == hcnt) head_done = 1'b0;
  end

  assign op_ready  = used(wcnt, hcnt) < cnt_t'(DEPTH);
  assign res_valid = head_done;
  assign res_sum   = mem_res[slot(hcnt)][N-1:0];
  assign res_cout  = mem_res[slot(hcnt)][N];

  always_ff @(posedge clk) begin
    if (rst) begin
      wcnt <= '0;
      hcnt <= '0;
    end else begin
      if (op_valid && op_ready) begin
        mem_a[slot(wcnt)]   <= op_a;
        mem_b[slot(wcnt)]   <= op_b;
        mem_cin[slot(wcnt)] <= op_cin;
        wcnt <= inc(wcnt);
      end
      if (res_valid && res_ready) hcnt <= inc(hcnt);
    end
  end

  // ---- input lanes -------------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < L; j++) begin
        icnt[j] <= '0;
        iph[j]  <= 1'b0;
      end
    end else if (skew) begin
      for (int j = 0; j < L; j++) begin
        if (!iph[j] && in_ack[j] && icnt[j] != wcnt && used(icnt[j], hcnt) < cnt_t'(DEPTH))
          iph[j] <= 1'b1;
        else if (iph[j] && !in_ack[j]) begin
          iph[j]  <= 1'b0;
          icnt[j] <= inc(icnt[j]);
        end
      end
    end else begin
      if (word_go_data)
        for (int j = 0; j < L; j++) iph[j] <= 1'b1;
      else if (word_go_null)
        for (int j = 0; j < L; j++) begin
          iph[j]  <= 1'b0;
          icnt[j] <= inc(icnt[j]);
        end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_drive
    assign a_dr[i] = iph[i] ? dr_data(mem_a[slot(icnt[i])][i]) : DR_NULL;
    assign b_dr[i] = iph[i] ? dr_data(mem_b[slot(icnt[i])][i]) : DR_NULL;
  end
  assign cin_dr = iph[N] ? dr_data(mem_cin[slot(icnt[N])]) : DR_NULL;

  // ---- output lanes (de-skew registers) ----------------------------------
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < L; k++) begin
        ocnt[k] <= '0;
        oph[k]  <= 1'b0;
      end
    end else begin
      for (int k = 0; k < L; k++) begin
        if (!oph[k] && dr_is_data(out_dr[k])) begin
          mem_res[slot(ocnt[k])][k] <= out_dr[k].r1;
          oph[k] <= 1'b1;
        end else if (oph[k] && dr_is_null(out_dr[k])) begin
          oph[k]  <= 1'b0;
          ocnt[k] <= inc(ocnt[k]);
        end
      end
    end
  end

  // carry-out receiver: ask for DATA until captured, then for NULL
  assign req_msb = ~oph[N];

  a_no_illegal: assert property (@(posedge clk) disable iff (rst)
                                 !dr_is_illegal(cout_dr));
  a_depth_pow2: assert property (@(posedge clk) (DEPTH & (DEPTH - 1)) == 0);

endmodule
