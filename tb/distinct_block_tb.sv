// distinct_block_tb -- self-checking test of the Distinct Block unit.
//
// For random codeword indices, decoded sizes and raw bits the expected slice
// image is assembled in the testbench by copying the first 2^q primitive
// parts of the block into every aligned group of 2^q parts (or the raw part
// into every part for a failed codeword) and compared with the unit's
// output. All combinations of block and size are also swept once.
module distinct_block_tb;
  localparam int unsigned N_SC  = vrh_pkg::N_SC;
  localparam int unsigned PSIZE = vrh_pkg::PSIZE;
  localparam int unsigned MAX   = vrh_pkg::MAX;
  localparam int unsigned M     = vrh_pkg::M;
  localparam int unsigned IW    = $clog2(M + 1);
  localparam int unsigned QW    = $clog2(MAX + 1);

  logic [IW-1:0]    code_index = '0;
  logic             failed = 1'b0;
  logic [PSIZE-1:0] raw_data = '0;
  logic [QW-1:0]    size_q = '0;
  logic [N_SC-1:0]  block_out;

  int checks = 0, failures = 0;

  distinct_block dut (.*);

  function automatic logic [N_SC-1:0] expected(int k, bit f, logic [PSIZE-1:0] raw, int q);
    logic [N_SC-1:0] e;
    int group = PSIZE * (1 << q);
    for (int g = 0; g < (1 << MAX); g += (1 << q))
      for (int b = 0; b < group; b++)
        e[g * PSIZE + b] = f ? raw[b % PSIZE] : vrh_pkg::DEF_BLOCKS[k * N_SC + b];
    return e;
  endfunction

  task automatic apply(int k, bit f, int q);
    code_index = IW'(k);
    failed     = f;
    raw_data   = PSIZE'($urandom);
    size_q     = QW'(q);
    #1;
    checks++;
    if (block_out !== expected(k, f, raw_data, q)) begin
      failures++;
      if (failures < 10) $display("FAIL k=%0d f=%0d q=%0d got %h", k, f, q, block_out);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < int'(M); k++)
      for (int q = 0; q <= int'(MAX); q++) apply(k, 1'b0, q);
    for (int n = 0; n < 2000; n++) begin
      if ($urandom_range(0, 4) == 0) apply(int'(M), 1'b1, 0);
      else apply($urandom_range(0, M - 1), 1'b0, $urandom_range(0, MAX));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
