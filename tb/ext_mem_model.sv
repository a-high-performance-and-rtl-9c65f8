// ext_mem_model: behavioural model of the external memory and its controller
// as seen by the 2-D cache (not synthesizable, testbench only).
//
// Accepts AU-Block requests (picture slot, AU column, first row, length),
// sometimes refusing one for a cycle, and returns the requested AUs one per
// beat, in request order, LATENCY cycles or more after the request. A
// returned AU holds the 8 pixels (col*8 .. col*8+7, row) of the synthetic
// picture of mc_ref_pkg; chroma planes (4:2:0, half size) are separate
// synthetic pictures numbered pic+16 (Cb) and pic+32 (Cr). It counts requests
// and returned AUs.
module ext_mem_model
  import mc_pkg::*;
  import mc_ref_pkg::*;
#(
  parameter int LATENCY = 12,
  parameter int PIC_W   = 1920,
  parameter int PIC_H   = 1088
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            mreq_valid,
  output logic            mreq_ready,
  input  au_block_t       mreq,
  output logic            mresp_valid,
  output logic [AU_W-1:0] mresp_data,
  output int              n_req,
  output int              n_au
);
  typedef struct { int pic; int plane; int col; int y0; int len; longint due; } job_t;
  job_t   jobs [$];
  longint now = 0;
  int     beat = 0;

  always @(posedge clk) begin
    now <= now + 1;
    mreq_ready <= ($urandom_range(0, 7) != 0);
    if (!rst_n) begin
      mreq_ready <= 1'b0;
      jobs = {};
      n_req <= 0;
      n_au  <= 0;
      beat  = 0;
    end else begin
      if (mreq_valid && mreq_ready) begin
        job_t j;
        j.pic = int'(mreq.pic_id); j.plane = mreq.id.chroma ? 1 + int'(mreq.cr) : 0; j.col = int'(mreq.col); j.y0 = int'(mreq.y0);
        j.len = int'(mreq.len); j.due = now + longint'(LATENCY) + longint'($urandom_range(0, 4));
        jobs.push_back(j);
        n_req <= n_req + 1;
      end
    end
  end

  always @(posedge clk) begin
    mresp_valid <= 1'b0;
    if (rst_n && jobs.size() > 0 && jobs[0].due <= now) begin
      logic [AU_W-1:0] d;
      for (int i = 0; i < 8; i++)
        d[i*8 +: 8] = jobs[0].plane == 0 ?
          8'(pix(jobs[0].pic, jobs[0].col * 8 + i, jobs[0].y0 + beat, PIC_W, PIC_H)) :
          8'(pix(jobs[0].pic + 16 * jobs[0].plane, jobs[0].col * 8 + i, jobs[0].y0 + beat, PIC_W / 2, PIC_H / 2));
      mresp_valid <= 1'b1;
      mresp_data  <= d;
      n_au <= n_au + 1;
      beat = beat + 1;
      if (beat == jobs[0].len) begin
        beat = 0;
        void'(jobs.pop_front());
      end
    end
  end
endmodule
