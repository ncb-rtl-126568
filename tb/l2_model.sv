// l2_model: behavioural model of an ideal next memory level for the I-cache.
//
// Every request is answered LATENCY cycles after it is first seen, with the 8
// program words of the requested 32-byte block taken from tb_prog_pkg. The
// request is held by the cache until the answer, so one request is served at
// a time. Not synthesizable; for testbenches only.
module l2_model
  import ncb_pkg::*;
#(
  parameter int unsigned LATENCY = 6
) (
  input  logic      clk,
  input  logic      req_valid,
  input  addr_t     req_addr,
  output logic      resp_valid,
  output inst_vec_t resp_data
);

  int unsigned wait_cnt = 0;

  always_comb begin
    for (int i = 0; i < int'(FETCH_W); i++)
      resp_data[i] = tb_prog_pkg::word_at(req_addr + 32'(4 * i));
  end

  assign resp_valid = req_valid && (wait_cnt == LATENCY - 1);

  always_ff @(posedge clk) begin
    if (!req_valid || resp_valid) wait_cnt <= 0;
    else                          wait_cnt <= wait_cnt + 1;
  end

endmodule
