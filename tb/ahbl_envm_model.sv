// ahbl_envm_model: behavioural model (not synthesizable logic of this
// design) of the flash instruction memory as seen through the fabric's
// AHB-Lite master interface.
//
// Read-only memory at BASE. Every word reads as envm_word(address), a fixed
// pattern the testbenches can recompute. An address phase (HTRANS=NONSEQ
// with HREADY high) is followed by a data phase of WAIT wait states (HREADY
// low) and one OKAY cycle with HRDATA. Writes get the two-cycle AHB ERROR
// response, since the memory is not written while the program runs.
// Addresses at or above HANG_ADDR model a stuck access: HREADY stays low for
// HANG cycles (longer than the bus keeper's window) before an OKAY.
// Counts reads, writes (errors) and hangs for the testbenches.
module ahbl_envm_model #(
  parameter logic [31:0] BASE      = 32'h6000_0000,
  parameter logic [31:0] HANG_ADDR = 32'h60F0_0000,
  parameter int unsigned WAIT      = 2,
  parameter int unsigned HANG      = 40
) (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic [31:0] haddr,
  input  logic        hwrite,
  input  logic [1:0]  htrans,
  input  logic [2:0]  hsize,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata,
  output logic        hready,
  output logic        hresp
);

  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_ERR1, S_ERR2} st_e;
  st_e st;
  int unsigned cnt;
  logic [31:0] a_q;
  int unsigned n_reads = 0, n_writes = 0, n_hangs = 0;

  function automatic logic [31:0] envm_word(logic [31:0] a);
    return {a[31:2], 2'b00} ^ 32'h0F1E_2D3C;
  endfunction

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      st <= S_IDLE; hready <= 1'b1; hresp <= 1'b0; hrdata <= '0; cnt <= 0; a_q <= '0;
    end else begin
      unique case (st)
        S_IDLE, S_WAIT: begin
          if (st == S_WAIT && cnt > 0) begin
            cnt <= cnt - 1;
            if (cnt == 1) begin hready <= 1'b1; hrdata <= envm_word(a_q); st <= S_IDLE; end
          end else if (htrans == 2'b10 && hready) begin
            a_q <= haddr;
            if (hwrite) begin
              n_writes++;
              st <= S_ERR1; hready <= 1'b0; hresp <= 1'b1;
            end else begin
              int unsigned w;
              w = (haddr >= HANG_ADDR) ? HANG : WAIT;
              if (haddr >= HANG_ADDR) n_hangs++; else n_reads++;
              if (w == 0) begin hready <= 1'b1; hrdata <= envm_word(haddr); st <= S_IDLE; end
              else begin hready <= 1'b0; cnt <= w; st <= S_WAIT; end
            end
          end else begin
            hresp <= 1'b0;
          end
        end
        S_ERR1: begin hready <= 1'b1; st <= S_ERR2; end
        S_ERR2: begin hresp <= 1'b0; st <= S_IDLE; end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
