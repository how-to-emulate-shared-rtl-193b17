// tb_memory_module: loads random hash-table pointers and a random overflow
// area (about half the slots valid, keys from a small range so that several
// slots of a group may hold the same key) into one module, then checks the
// hash-table read port and the overflow search against a model: for random
// group pointers and keys the search must report a hit exactly when a valid
// slot among the SLOTS words from the pointer holds the key, with the data of
// the first such slot. Slots beyond the end of the overflow area are never
// matched. Reset must leave every slot empty.
module tb_memory_module;
  import emu_pkg::*;
  logic clk = 1'b0, rst_n;
  logic we, wvalid, ov_hit;
  logic [LA_W-1:0] waddr;
  logic [ADDR_W-1:0] wkey, ov_key;
  logic [DATA_W-1:0] wdata, ht_ptr, ov_ptr, ov_data;
  logic [LOC_W-1:0] ht_addr;

  memory_module dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0, hits = 0;

  logic [DATA_W-1:0] m_table [WORDS_PER_MODULE];
  bit                m_valid [OVF_WORDS];
  logic [ADDR_W-1:0] m_key   [OVF_WORDS];
  logic [DATA_W-1:0] m_data  [OVF_WORDS];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic search_check(int ptr, int key);
    bit e_hit;
    logic [DATA_W-1:0] e_data;
    e_hit = 0; e_data = '0;
    for (int j = 0; j < SLOTS; j++) begin
      int a;
      a = ptr + j - WORDS_PER_MODULE;
      if (!e_hit && a >= 0 && a < OVF_WORDS && m_valid[a] && m_key[a] == ADDR_W'(key)) begin
        e_hit = 1; e_data = m_data[a];
      end
    end
    ov_ptr = DATA_W'(ptr); ov_key = ADDR_W'(key);
    #1;
    check(ov_hit == e_hit, $sformatf("ptr %0d key %0d hit %0d expected %0d", ptr, key, ov_hit, e_hit));
    if (e_hit) begin
      hits++;
      check(ov_data == e_data, $sformatf("ptr %0d key %0d data %h expected %h", ptr, key, ov_data, e_data));
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; we = 0; waddr = 0; wvalid = 0; wkey = 0; wdata = 0; ht_addr = 0; ov_ptr = 0; ov_key = 0;
    for (int a = 0; a < OVF_WORDS; a++) m_valid[a] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // after reset nothing is found
    for (int p = 0; p < LOCAL_WORDS; p++) for (int k = 0; k < 4; k++) search_check(p, $urandom_range(M - 1));
    for (int pass = 0; pass < 4; pass++) begin
      for (int w = 0; w < LOCAL_WORDS; w++) begin
        int a;
        a = (pass % 2 != 0) ? LOCAL_WORDS - 1 - w : w;
        we = 1; waddr = LA_W'(a); wdata = DATA_W'($urandom);
        wvalid = ($urandom_range(1) == 1); wkey = ADDR_W'($urandom_range(7));
        if (a < WORDS_PER_MODULE) m_table[a] = wdata;
        else begin
          m_valid[a - WORDS_PER_MODULE] = wvalid;
          m_key[a - WORDS_PER_MODULE]   = wkey;
          m_data[a - WORDS_PER_MODULE]  = wdata;
        end
        @(negedge clk);
      end
      we = 0;
      for (int l = 0; l < WORDS_PER_MODULE; l++) begin
        ht_addr = LOC_W'(l);
        #1;
        check(ht_ptr == m_table[l], $sformatf("pointer %0d read %h expected %h", l, ht_ptr, m_table[l]));
      end
      for (int t = 0; t < 400; t++) search_check($urandom_range(LOCAL_WORDS + 2), $urandom_range(8));
      @(negedge clk);
    end
    check(hits > 0, "searches found keys");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
