// dram_model: behavioural model of external memory behind the memory
// controller, for simulation only.
//
// A word-addressed array with the accelerator's two channels. The read
// channel accepts a request when ready (ready is randomly withheld when
// STALLS is set), and returns a beat of BW consecutive words with the tag
// in order LAT cycles later; only the words the tag's mask asks for are
// read. The write channel accepts a beat when ready (also randomly
// withheld) and writes its masked words at once. Out-of-range addresses of
// wanted words read as zero and are counted.
module dram_model
  import ican_pkg::*;
#(
  parameter int WORDS  = 16384,
  parameter int LAT    = 4,
  parameter bit STALLS = 1'b1,
  parameter int BW     = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_req_valid,
  output logic              rd_req_ready,
  input  logic [ADDR_W-1:0] rd_req_addr,
  input  fetch_tag_t        rd_req_tag,
  output logic              rd_resp_valid,
  output word_t             rd_resp_data [BW],
  output fetch_tag_t        rd_resp_tag,
  input  logic              wr_valid,
  output logic              wr_ready,
  input  logic [ADDR_W-1:0] wr_addr,
  input  word_t             wr_data [BW],
  input  logic [BW-1:0]     wr_mask
);

  word_t      mem [WORDS];
  logic       pv [LAT];
  word_t      pd [LAT][BW];
  fetch_tag_t pt [LAT];
  int         bad_addr = 0;
  int         writes = 0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) pv[i] <= 1'b0;
      rd_req_ready <= 1'b0;
      wr_ready     <= 1'b0;
    end else begin
      rd_req_ready <= STALLS ? ($urandom_range(0, 3) != 0) : 1'b1;
      wr_ready     <= STALLS ? ($urandom_range(0, 3) != 0) : 1'b1;
      pv[0] <= rd_req_valid && rd_req_ready;
      pt[0] <= rd_req_tag;
      for (int b = 0; b < BW; b++) begin
        pd[0][b] <= '0;
        if (rd_req_tag.mask[b]) begin
          if (rd_req_addr + ADDR_W'(b) < WORDS) pd[0][b] <= mem[rd_req_addr + ADDR_W'(b)];
          else if (rd_req_valid && rd_req_ready) bad_addr++;
        end
      end
      for (int i = 1; i < LAT; i++) begin
        pv[i] <= pv[i-1];
        pd[i] <= pd[i-1];
        pt[i] <= pt[i-1];
      end
      if (wr_valid && wr_ready)
        for (int b = 0; b < BW; b++)
          if (wr_mask[b]) begin
            writes++;
            if (wr_addr + ADDR_W'(b) < WORDS) mem[wr_addr + ADDR_W'(b)] <= wr_data[b];
            else bad_addr++;
          end
    end
  end

  assign rd_resp_valid = pv[LAT-1];
  assign rd_resp_data  = pd[LAT-1];
  assign rd_resp_tag   = pt[LAT-1];

endmodule
