// tb_assoc_memory: the 64 x 80 associative memory is filled with random words
// (many sharing field values, so searches have several responders), then
// searched with random comparands under random field masks. After each search
// the responders, any_match and first_addr are compared with a reference
// search of a copy of the array, and the responders are walked with
// resp_clear, which must visit the matches in ascending address order. Also
// checked: bit-selective writes, both read ports, occupied bits (unwritten
// words never respond) and clear_all. Each search must answer in one cycle.
module tb_assoc_memory;
  import cbadp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clear_all = 0, cmp_load = 0, mask_load = 0, search = 0, resp_clear = 0, wr_en = 0;
  logic [WORD_W-1:0] cmp_in = '0, mask_in = '0, comparand, mask, wr_data = '0, wr_bits = '0;
  logic [WORD_W-1:0] rd_data, io_rd_data;
  logic [DEPTH-1:0] responders;
  logic any_match;
  logic [ADDR_W-1:0] first_addr, wr_addr = '0, rd_addr = '0, io_rd_addr = '0;
  logic [WORD_W-1:0] model [DEPTH];
  logic [DEPTH-1:0] occ = '0;
  int checks = 0, failures = 0, multi = 0;

  assoc_memory dut (.*);
  always #5 clk = ~clk;

  task automatic write(input int addr, input logic [WORD_W-1:0] data, input logic [WORD_W-1:0] bits);
    @(negedge clk);
    wr_en = 1; wr_addr = ADDR_W'(addr); wr_data = data; wr_bits = bits;
    @(negedge clk);
    wr_en = 0;
    model[addr] = (model[addr] & ~bits) | (data & bits);
    occ[addr] = 1'b1;
  endtask

  function automatic logic [WORD_W-1:0] rnd_word();
    logic [WORD_W-1:0] w;
    for (int i = 0; i < WORD_W; i += 32) w[i +: 32] = WORD_W'($urandom) ;
    w[79:62] = {2'($urandom), 4'($urandom % 4), 6'($urandom % 8), 6'($urandom % 8)};
    return w;
  endfunction

  task automatic do_search(input logic [WORD_W-1:0] c, input logic [WORD_W-1:0] m);
    logic [DEPTH-1:0] exp_r;
    int n;
    @(negedge clk);
    cmp_load = 1; mask_load = 1; cmp_in = c; mask_in = m;
    @(negedge clk);
    cmp_load = 0; mask_load = 0; search = 1;
    @(negedge clk);
    search = 0;
    for (int i = 0; i < DEPTH; i++) exp_r[i] = occ[i] && (((model[i] ^ c) & m) == '0);
    checks++;
    if (responders !== exp_r || any_match !== (exp_r != 0)) begin
      failures++; $display("FAIL search responders %h exp %h", responders, exp_r);
    end
    n = 0;
    for (int i = 0; i < DEPTH; i++) if (exp_r[i]) begin
      checks++;
      rd_addr = first_addr;
      #1;
      if (first_addr !== ADDR_W'(i) || rd_data !== model[i]) begin
        failures++; $display("FAIL walk first_addr %0d exp %0d", first_addr, i);
      end
      resp_clear = 1;
      @(negedge clk);
      resp_clear = 0;
      n++;
    end
    if (n > 1) multi++;
    checks++;
    if (any_match !== 0) begin failures++; $display("FAIL responders left"); end
  endtask

  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    // fill 56 of 64 words, leaving some unoccupied
    for (int i = 0; i < DEPTH; i++) if (i % 8 != 5) write(i, rnd_word(), '1);
    for (int i = 0; i < 64; i++) begin
      io_rd_addr = ADDR_W'(i); #1;
      if (occ[i]) begin
        checks++;
        if (io_rd_data !== model[i]) begin failures++; $display("FAIL io read %0d", i); end
      end
    end
    // searches on node fields
    for (int t = 0; t < 150; t++) begin
      logic [WORD_W-1:0] m;
      m = '0;
      if ($urandom % 2) m[77:74] = '1;
      if ($urandom % 2) m[73:68] = '1;
      if ($urandom % 2) m[67:62] = '1;
      if ($urandom % 4 == 0) m[79] = 1'b1;
      do_search(model[$urandom % DEPTH] ^ (($urandom % 3 == 0) ? {2'b0, 4'($urandom), 74'd0} : '0), m);
    end
    // bit-selective writes of one field
    for (int t = 0; t < 40; t++) begin
      logic [WORD_W-1:0] bits;
      bits = '0; bits[77:74] = '1;
      // occupied words only: the other bits of a never-written word are undefined
      write(int'($urandom % (DEPTH / 8)) * 8 + ((($urandom % 7) + 6) % 8), rnd_word(), bits);
      do_search({2'b0, 4'($urandom % 4), 74'd0}, bits);
    end
    // clear_all: nothing responds afterwards
    @(negedge clk); clear_all = 1; @(negedge clk); clear_all = 0; occ = '0;
    do_search('0, '0);
    checks++;
    if (multi == 0) begin failures++; $display("FAIL no multiple-response search"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
