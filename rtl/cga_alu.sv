// cga_alu: the basic-operation half of the coprocessor, three independent
// pipelines side by side: products (opcodes 00xx, latency 3), sums and
// differences (01xx, latency 2) and unary operations (10xx, latency 1).
//
// Each pipeline has its own valid/instruction input and valid/result output
// and accepts one operation per clock; there is no back-pressure inside the
// ALU (the controller only starts an operation when the pipeline's output
// queue has room for it). The grouping into three pipelines is the
// document's; the latencies are this design's.
module cga_alu
  import cga_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    prod_valid,
  input  instr_t  prod_in,
  output logic    prod_out_valid,
  output result_t prod_out,
  input  logic    sum_valid,
  input  instr_t  sum_in,
  output logic    sum_out_valid,
  output result_t sum_out,
  input  logic    un_valid,
  input  instr_t  un_in,
  output logic    un_out_valid,
  output result_t un_out
);

  products_unit u_products (
    .clk, .rst_n,
    .in_valid (prod_valid),
    .in       (prod_in),
    .out_valid(prod_out_valid),
    .out      (prod_out)
  );

  sums_unit u_sums (
    .clk, .rst_n,
    .in_valid (sum_valid),
    .in       (sum_in),
    .out_valid(sum_out_valid),
    .out      (sum_out)
  );

  unary_unit u_unary (
    .clk, .rst_n,
    .in_valid (un_valid),
    .in       (un_in),
    .out_valid(un_out_valid),
    .out      (un_out)
  );

endmodule
