// tb_branch_unit - self-checking test of the CAM branch unit.
//
// Loads random branch tags and ternary case entries through the configuration
// ports, then applies random searches, half of them built to hit a stored
// entry (its value with the don't-care bits randomised), and compares hit,
// instruction, fetch address and the selected branch/case with a reference
// search kept in the testbench (lowest branch, then lowest case wins). It also
// checks that invalidating a branch and a case removes their matches.
module tb_branch_unit;
  localparam int NB = 16, NC = 4, PCW = 8, KW = 40, IW = 28;

  logic clk = 0, rst_n = 0;
  logic [PCW-1:0] pc;
  logic [KW-1:0]  key;
  logic           hit;
  logic [IW-1:0]  instr;
  logic [PCW-1:0] fetch_addr;
  logic [3:0]     hit_br;
  logic [1:0]     hit_case;
  logic           cfg_br_we = 0, cfg_br_valid = 0, cfg_case_we = 0, cfg_case_valid = 0;
  logic [3:0]     cfg_br = 0;
  logic [1:0]     cfg_case = 0;
  logic [PCW-1:0] cfg_br_pc = 0, cfg_case_addr = 0;
  logic [KW-1:0]  cfg_case_value = 0, cfg_case_mask = 0;
  logic [IW-1:0]  cfg_case_instr = 0;

  branch_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // reference copy
  bit             r_bv [NB];
  bit [PCW-1:0]   r_pc [NB];
  bit             r_cv [NB][NC];
  bit [KW-1:0]    r_val[NB][NC], r_msk[NB][NC];
  bit [IW-1:0]    r_ins[NB][NC];
  bit [PCW-1:0]   r_adr[NB][NC];

  task automatic wr_br(int b, bit v, bit [PCW-1:0] p);
    cfg_br_we = 1; cfg_br = 4'(b); cfg_br_valid = v; cfg_br_pc = p;
    @(posedge clk); #1 cfg_br_we = 0;
    r_bv[b] = v; r_pc[b] = p;
  endtask

  task automatic wr_case(int b, int c, bit v, bit [KW-1:0] val, bit [KW-1:0] msk,
                         bit [IW-1:0] ins, bit [PCW-1:0] adr);
    cfg_case_we = 1; cfg_br = 4'(b); cfg_case = 2'(c); cfg_case_valid = v;
    cfg_case_value = val; cfg_case_mask = msk; cfg_case_instr = ins; cfg_case_addr = adr;
    @(posedge clk); #1 cfg_case_we = 0;
    r_cv[b][c] = v; r_val[b][c] = val; r_msk[b][c] = msk; r_ins[b][c] = ins; r_adr[b][c] = adr;
  endtask

  function automatic bit [KW-1:0] rnd_key();
    return {8'($urandom), $urandom};
  endfunction

  task automatic check_search();
    bit e_hit = 0; bit [IW-1:0] e_ins = 0; bit [PCW-1:0] e_adr = 0;
    int e_b = 0, e_c = 0;
    for (int b = 0; b < NB && !e_hit; b++)
      if (r_bv[b] && r_pc[b] == pc)
        for (int c = 0; c < NC && !e_hit; c++)
          if (r_cv[b][c] && ((key & r_msk[b][c]) == (r_val[b][c] & r_msk[b][c]))) begin
            e_hit = 1; e_ins = r_ins[b][c]; e_adr = r_adr[b][c]; e_b = b; e_c = c;
          end
    #1;
    checks++;
    if (hit !== e_hit) begin
      failures++; $display("FAIL hit pc=%0h key=%0h got %0b exp %0b", pc, key, hit, e_hit);
    end else if (e_hit) begin
      checks++;
      if (instr !== e_ins || fetch_addr !== e_adr || int'(hit_br) != e_b || int'(hit_case) != e_c) begin
        failures++;
        $display("FAIL data pc=%0h key=%0h got %0h/%0h/%0d/%0d exp %0h/%0h/%0d/%0d", pc, key,
                 instr, fetch_addr, hit_br, hit_case, e_ins, e_adr, e_b, e_c);
      end
    end
  endtask

  int hits = 0;
  initial begin
    pc = 0; key = 0;
    for (int b = 0; b < NB; b++) begin
      r_bv[b] = 0; r_pc[b] = 0;
      for (int c = 0; c < NC; c++) r_cv[b][c] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // after reset nothing matches
    for (int i = 0; i < 20; i++) begin
      pc = 8'($urandom); key = rnd_key(); check_search();
    end
    // tags: 12 distinct pcs, plus two branches sharing a tag
    for (int b = 0; b < NB; b++)
      wr_br(b, (b != 7), (b == 15) ? 8'(3 * 5 + 1) : 8'(b * 5 + 1));
    for (int b = 0; b < NB; b++)
      for (int c = 0; c < NC; c++)
        wr_case(b, c, ($urandom % 8) != 0, rnd_key(),
                (c == 3) ? {KW{1'b1}} : ~(rnd_key() & rnd_key() & rnd_key()),
                IW'($urandom), 8'($urandom));
    // some entries overlap on purpose: case 1 of branch 2 copies case 0
    wr_case(2, 0, 1, r_val[2][0], r_msk[2][0], r_ins[2][0], r_adr[2][0]);
    wr_case(2, 1, 1, r_val[2][0], r_msk[2][0], 28'h1234567, 8'h42);
    // case 2 of branch 5 matches any key: it is the fallback behind 0 and 1
    wr_case(5, 2, 1, '0, '0, 28'h0abcdef, 8'h99);
    for (int c = 0; c < NC; c++) begin
      pc = r_pc[2]; key = r_val[2][0]; check_search();
      pc = r_pc[5]; key = r_val[5][c]; check_search();
    end
    for (int i = 0; i < 4000; i++) begin
      int b = $urandom % NB, c = $urandom % NC;
      if (i % 2 == 0) begin
        pc  = r_pc[b];
        key = (r_val[b][c] & r_msk[b][c]) | (rnd_key() & ~r_msk[b][c]);
      end else begin
        pc  = (i % 3 == 0) ? r_pc[b] : 8'($urandom);
        key = rnd_key();
      end
      check_search();
      if (hit) hits++;
      @(posedge clk);
    end
    // invalidate branch 2 and case 0 of branch 4, then search them again
    wr_br(2, 0, r_pc[2]);
    wr_case(4, 0, 0, r_val[4][0], r_msk[4][0], r_ins[4][0], r_adr[4][0]);
    for (int c = 0; c < NC; c++) begin
      pc = r_pc[2]; key = r_val[2][c]; check_search();
      pc = r_pc[4]; key = r_val[4][c]; check_search();
    end
    checks++;
    if (hits < 1000) begin
      failures++; $display("FAIL too few hits: %0d", hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
