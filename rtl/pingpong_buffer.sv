// pingpong_buffer -- two-bank buffer for filtered projections.
//
// Decouples the filtering stage from the backprojection stage: while the
// filtered projection of the current angle is written into one bank, the
// filtered projection of the previous angle is read from the other.  The
// two-bank scheme is the source design's; the handshake is this design's.
//
// How it works: each bank has a "full" flag.  The writer always writes the
// bank selected by wr_bank and may do so only while that bank is not full
// (wr_ready).  A wr_commit pulse marks the bank full and moves the writer to
// the other bank.  The reader always reads the bank selected by rd_bank,
// which holds valid data while it is full (rd_ready); an rd_release pulse
// empties it and moves the reader to the other bank.  Both selectors start
// at bank 0 after reset, so banks are handed over strictly in turn.
//
// Interface and timing: writes take effect at the clock edge.  Reads are
// synchronous: rd_data shows mem[rd_bank][rd_addr] one cycle after rd_addr
// is presented (a block-RAM read).  rd_release may be given in the same
// cycle as the last read of a bank; rd_next_ready tells the reader in that
// cycle whether the other bank is already full, so it can continue without
// a gap.  A bank committed at edge k is visible as rd_ready after that edge.
module pingpong_buffer
#(
  parameter int DEPTH = fbp_pkg::N_DET,
  parameter int WIDTH = fbp_pkg::FILT_W,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // write side (filtering subsystem)
  output logic             wr_ready,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             wr_commit,
  // read side (backprojector)
  output logic             rd_ready,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  input  logic             rd_release,
  output logic             rd_next_ready,
  // status
  output logic             wr_bank,
  output logic             rd_bank
);

  logic [WIDTH-1:0] bank0 [DEPTH];
  logic [WIDTH-1:0] bank1 [DEPTH];
  logic [1:0]       full;

  assign wr_ready = !full[wr_bank];
  assign rd_ready = full[rd_bank];
  assign rd_next_ready = full[!rd_bank];

  always_ff @(posedge clk) begin
    if (wr_en && wr_ready) begin
      if (wr_bank) bank1[wr_addr] <= wr_data;
      else         bank0[wr_addr] <= wr_data;
    end
  end

  always_ff @(posedge clk) begin
    rd_data <= rd_bank ? bank1[rd_addr] : bank0[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full    <= 2'b00;
      wr_bank <= 1'b0;
      rd_bank <= 1'b0;
    end else begin
      if (wr_commit && wr_ready) begin
        full[wr_bank] <= 1'b1;
        wr_bank       <= !wr_bank;
      end
      if (rd_release && rd_ready) begin
        full[rd_bank] <= 1'b0;
        rd_bank       <= !rd_bank;
      end
    end
  end

  // Handshake rules: no write, commit or release into a bank in the wrong state.
  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> wr_ready)
    else $error("pingpong_buffer: write into a full bank");
  assert property (@(posedge clk) disable iff (!rst_n) wr_commit |-> wr_ready)
    else $error("pingpong_buffer: commit of a full bank");
  assert property (@(posedge clk) disable iff (!rst_n) rd_release |-> rd_ready)
    else $error("pingpong_buffer: release of an empty bank");
  assert property (@(posedge clk) disable iff (!rst_n) (wr_addr < AW'(DEPTH)) || !wr_en)
    else $error("pingpong_buffer: write address out of range");

endmodule
