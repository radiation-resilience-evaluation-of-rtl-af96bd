// tb_rv_ecc_soc_top: end-to-end test of the SoC fabric at its default sizes
// (16 KB DMEM, 32 registers, 15-cycle bus window, ECC+TMR).
//
// The testbench plays the CPU core (fetch port, data port, register-file
// port) and uses ahbl_envm_model for the flash instruction memory behind the
// AHB-Lite port. The sequence follows one run of the radiation-test software:
//  1. instruction fetches from the flash at 0x6000_0000 through the external
//     Wishbone interface and the Wishbone-to-AHB-Lite bridge;
//  2. DMEM initialised to zero over its full 16 KB, then filled with a
//     pattern by word, half-word and byte stores, some with one injected bit
//     flip (dmem_inj_i) and one with two;
//  3. a scrubbing pass (load + store back of every word): every load must
//     return the pattern; the DMEM single/double counters must equal the
//     number of injected words; a second pass must find nothing;
//  4. fetches and loads issued in the same cycle (data first);
//  5. register-file writes with injected single and double errors, read back
//     through both ports (counters checked);
//  6. a fetch from a stuck flash address (bus keeper timeout) and a store to
//     the read-only flash (AHB error) both end in a bus fault, with the keeper
//     register showing the fault type;
//  7. upsets of single TMR copies in every control unit during traffic,
//     which must not disturb any transfer;
//  8. the counter check of the ECC: words 1..100 stored with one bit flipped
//     at every encoder output and read back give a DMEM single-error count of
//     exactly 100 (one per load, whatever the number of lanes hit), and 0
//     without the flip.
// Each of these mechanisms is counted and must have happened at least once.
module tb_rv_ecc_soc_top;
  import ecc_pkg::*;
  localparam int unsigned WORDS = DMEM_SIZE / 4;

  logic clk = 0, rst_n = 0;
  bus_req_t ireq = '0, dreq = '0;
  bus_rsp_t irsp, drsp;
  logic rf_ren = 0, rf_we = 0;
  logic [4:0] rs1a = 0, rs2a = 0, rda = 0;
  logic [31:0] rdd = 0, rs1, rs2;
  logic [1:0] e1, e2;
  logic [31:0] haddr, hwdata, hrdata;
  logic hwrite, hready, hresp0;
  logic [1:0] htrans;
  logic [2:0] hsize, hburst;
  logic [3:0] hprot;
  logic cnt_clr = 0;
  logic [31:0] c_ds, c_dd, c_rs, c_rd;
  logic fault, tmo, conflict;
  logic [12:0] dinj = '0;
  logic [38:0] rinj = '0;
  logic [11:0] seu = '0;

  int checks = 0, failures = 0;
  int m_fetch = 0, m_conflict = 0, m_dsingle = 0, m_ddouble = 0, m_rsingle = 0, m_rdouble = 0;
  int m_timeout = 0, m_deverr = 0, m_scrub = 0, m_tmr = 0, m_byte = 0, m_half = 0;

  always #50 clk = ~clk;   // 10 MHz

  rv_ecc_soc_top dut (
    .clk(clk), .rst_n(rst_n),
    .cpu_i_req(ireq), .cpu_i_rsp(irsp), .cpu_d_req(dreq), .cpu_d_rsp(drsp),
    .rf_ren(rf_ren), .rf_rs1_addr(rs1a), .rf_rs2_addr(rs2a), .rf_we(rf_we), .rf_rd_addr(rda),
    .rf_rd_data(rdd), .rf_rs1(rs1), .rf_rs2(rs2), .rf_rs1_err(e1), .rf_rs2_err(e2),
    .haddr(haddr), .hwrite(hwrite), .htrans(htrans), .hsize(hsize), .hburst(hburst),
    .hprot(hprot), .hwdata(hwdata), .hrdata(hrdata), .hready(hready), .hresp({1'b0, hresp0}),
    .cnt_clr(cnt_clr), .dmem_single_cnt(c_ds), .dmem_double_cnt(c_dd),
    .rf_single_cnt(c_rs), .rf_double_cnt(c_rd),
    .bus_fault(fault), .bus_timeout(tmo), .bus_conflict(conflict),
    .dmem_inj_i(dinj), .rf_inj_i(rinj), .seu_i(seu));

  ahbl_envm_model #(.WAIT(3), .HANG(40)) u_envm (
    .hclk(clk), .hresetn(rst_n), .haddr(haddr), .hwrite(hwrite), .htrans(htrans),
    .hsize(hsize), .hwdata(hwdata), .hrdata(hrdata), .hready(hready), .hresp(hresp0));

  always @(posedge clk) if (conflict) m_conflict++;
  always @(posedge clk) if (tmo) m_timeout++;

  task automatic chk(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  function automatic logic [31:0] envm_word(logic [31:0] a);
    return {a[31:2], 2'b00} ^ 32'h0F1E_2D3C;
  endfunction

  function automatic logic [31:0] pattern(int i);
    return 32'(i) * 32'h9E37_79B9 ^ 32'hC0DE_0000;
  endfunction

  // one transfer on the data port; returns read data and whether it faulted
  task automatic dacc(logic rw, logic [31:0] a, logic [3:0] ben, logic [31:0] wd,
                      output logic [31:0] rd, output logic ferr);
    int n;
    n = 0;
    @(negedge clk); dreq.stb = 1; dreq.rw = rw; dreq.addr = a; dreq.ben = ben; dreq.data = wd;
    @(negedge clk); dreq.stb = 0;
    while (!(drsp.ack || drsp.err) && n < 100) begin @(negedge clk); n++; end
    chk("data response", n < 100, 1);
    rd = drsp.data; ferr = drsp.err;
  endtask

  task automatic fetch(logic [31:0] a, output logic [31:0] rd, output logic ferr);
    int n;
    n = 0;
    @(negedge clk); ireq.stb = 1; ireq.rw = 0; ireq.addr = a; ireq.ben = 4'b1111;
    @(negedge clk); ireq.stb = 0;
    while (!(irsp.ack || irsp.err) && n < 100) begin @(negedge clk); n++; end
    chk("fetch response", n < 100, 1);
    rd = irsp.data; ferr = irsp.err;
  endtask

  task automatic store(logic [31:0] a, logic [3:0] ben, logic [31:0] wd);
    logic [31:0] rd; logic f;
    dacc(1'b1, a, ben, wd, rd, f);
    chk("store ok", f, 0);
  endtask

  task automatic load(logic [31:0] a, output logic [31:0] rd);
    logic f;
    dacc(1'b0, a, 4'b1111, 0, rd, f);
    chk("load ok", f, 0);
  endtask

  task automatic rf_write(logic [4:0] r, logic [31:0] d, logic [38:0] e);
    @(negedge clk); rf_we = 1; rda = r; rdd = d; rinj = e;
    @(negedge clk); rf_we = 0; rinj = '0;
  endtask

  task automatic rf_read(logic [4:0] a, logic [4:0] b);
    @(negedge clk); rs1a = a; rs2a = b; rf_ren = 1;
    @(negedge clk); rf_ren = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] rd, a, v;
    logic f;
    int n_inj;
    repeat (3) @(negedge clk); rst_n = 1;

    // 1. instruction fetches from flash
    for (int i = 0; i < 64; i++) begin
      a = ENVM_BASE + 32'(i * 4);
      fetch(a, rd, f);
      chk("fetch data", rd, envm_word(a)); chk("fetch ok", f, 0);
      m_fetch++;
    end

    // 2. DMEM: zero the whole memory, then write the pattern
    for (int i = 0; i < WORDS; i++) store(DMEM_BASE + 32'(i * 4), 4'b1111, 32'h0);
    n_inj = 0;
    for (int i = 0; i < WORDS; i++) begin
      a = DMEM_BASE + 32'(i * 4);
      v = pattern(i);
      case (i % 3)
        0: store(a, 4'b1111, v);
        1: begin store(a, 4'b0011, {16'h0, v[15:0]}); store(a + 2, 4'b1100, {v[31:16], 16'h0}); m_half++; end
        default: begin
          for (int l = 0; l < 4; l++) store(a + 32'(l), 4'b0001 << l, {4{v[8*l +: 8]}});
          m_byte++;
        end
      endcase
      if (i % 97 == 5) begin   // rewrite with one flipped bit in every lane
        dinj = 13'(1) << (i % 13);
        store(a, 4'b1111, v);
        dinj = '0;
        n_inj++;
      end
    end
    // one word with a double error in lane 2
    dinj = 13'b1000000000001;
    store(DMEM_BASE + 32'h100, 4'b0100, {8'h0, pattern(64)[23:16], 16'h0});
    dinj = '0;

    // 3. scrubbing pass, then a second clean pass
    cnt_clr = 1; @(negedge clk); cnt_clr = 0;
    for (int i = 0; i < WORDS; i++) begin
      a = DMEM_BASE + 32'(i * 4);
      load(a, rd);
      if (i != 64) chk("scrub load", rd, pattern(i));
      else         chk("double lanes kept", {rd[31:24], rd[15:0]}, {pattern(64)[31:24], pattern(64)[15:0]});
      store(a, 4'b1111, rd);
    end
    chk("dmem single count", c_ds, n_inj);
    chk("dmem double count", c_dd, 1);
    m_dsingle += c_ds; m_ddouble += c_dd;
    cnt_clr = 1; @(negedge clk); cnt_clr = 0;
    for (int i = 0; i < WORDS; i++) begin
      load(DMEM_BASE + 32'(i * 4), rd);
      if (i != 64) chk("clean load", rd, pattern(i));
    end
    chk("scrubbed: no errors", c_ds + c_dd, 0);
    m_scrub++;

    // 4. fetch and load in the same cycle, with TMR upsets on the way
    for (int i = 0; i < 40; i++) begin
      logic [31:0] ri, rdd2; logic fi, fd;
      seu = 12'(1) << ((i % 4) * 3 + (i % 3));
      m_tmr++;
      fork
        fetch(ENVM_BASE + 32'(i * 8), ri, fi);
        dacc(1'b0, DMEM_BASE + 32'(i * 4), 4'b1111, 0, rdd2, fd);
        begin @(negedge clk); @(negedge clk); seu = '0; end
      join
      chk("parallel fetch", ri, envm_word(ENVM_BASE + 32'(i * 8)));
      chk("parallel load", rdd2, pattern(i));
    end

    // 5. register file
    cnt_clr = 1; @(negedge clk); cnt_clr = 0;
    for (int r = 1; r < 32; r++) rf_write(5'(r), pattern(r + 1000), '0);
    for (int r = 1; r < 32; r++) begin
      rf_read(5'(r), 5'(32 - r));
      chk("rf rs1", rs1, pattern(r + 1000)); chk("rf rs2", rs2, pattern(32 - r + 1000));
    end
    rf_write(5'd7, pattern(7), 39'(1) << 20);
    rf_read(5'd7, 5'd0);
    chk("rf corrected", rs1, pattern(7)); chk("rf flag", e1, 2'b01); chk("x0", rs2, 0);
    rf_write(5'd9, pattern(9), 39'h3 << 30);
    rf_read(5'd0, 5'd9);
    chk("rf double flag", e2, 2'b10);
    @(negedge clk);
    chk("rf single count", c_rs, 1); chk("rf double count", c_rd, 1);
    m_rsingle += c_rs; m_rdouble += c_rd;

    // 6. bus faults
    fetch(32'h60F0_0000, rd, f);
    chk("timeout fault", f, 1);
    load(BUSKEEPER_ADDR, rd);
    chk("keeper: timeout", rd, 32'h8000_0001);
    repeat (60) @(negedge clk);   // let the stuck flash access finish
    dacc(1'b1, ENVM_BASE + 32'h40, 4'b1111, 32'h1234_5678, rd, f);
    chk("write to flash faults", f, 1);
    if (f) m_deverr++;
    load(BUSKEEPER_ADDR, rd);
    chk("keeper: device error", rd, 32'h8000_0000);
    load(BUSKEEPER_ADDR, rd);
    chk("keeper: flag cleared", rd[31], 0);
    fetch(ENVM_BASE + 32'h80, rd, f);
    chk("fetch after faults", rd, envm_word(ENVM_BASE + 32'h80));

    // 8. counter emulation: one bit flipped at every encoder output while the
    //    values 1..100 are stored as words, then read back: the DMEM single
    //    counter counts one event per load (100); without the flip it stays 0
    cnt_clr = 1; @(negedge clk); cnt_clr = 0;
    dinj = 13'b0000000000001;
    for (int i = 1; i <= 100; i++) store(DMEM_BASE + 32'h2000 + 32'(4 * i), 4'b1111, 32'(i));
    dinj = '0;
    for (int i = 1; i <= 100; i++) begin
      load(DMEM_BASE + 32'h2000 + 32'(4 * i), rd);
      chk("emulation load", rd, 32'(i));
    end
    @(negedge clk);
    chk("emulation single count", c_ds, 100);
    m_dsingle += c_ds;
    cnt_clr = 1; @(negedge clk); cnt_clr = 0;
    for (int i = 1; i <= 100; i++) store(DMEM_BASE + 32'h2000 + 32'(4 * i), 4'b1111, 32'(i));
    for (int i = 1; i <= 100; i++) load(DMEM_BASE + 32'h2000 + 32'(4 * i), rd);
    @(negedge clk);
    chk("emulation without flip", c_ds, 0);

    $display("mechanisms: fetch=%0d conflict=%0d dmem_single=%0d dmem_double=%0d rf_single=%0d rf_double=%0d timeout=%0d device_err=%0d scrub=%0d tmr_upsets=%0d byte=%0d half=%0d",
             m_fetch, m_conflict, m_dsingle, m_ddouble, m_rsingle, m_rdouble, m_timeout, m_deverr, m_scrub, m_tmr, m_byte, m_half);
    foreach (mech[i]) begin
      checks++;
      if (mech[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mech [12];
  always_comb mech = '{m_fetch, m_conflict, m_dsingle, m_ddouble, m_rsingle, m_rdouble,
                       m_timeout, m_deverr, m_scrub, m_tmr, m_byte, m_half};
endmodule
