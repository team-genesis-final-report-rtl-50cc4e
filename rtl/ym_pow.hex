7fa
7f5
7ef
7ea
7e4
7df
7da
7d4
7cf
7c9
7c4
7bf
7b9
7b4
7ae
7a9
7a4
79f
799
794
78f
78a
784
77f
77a
775
770
76a
765
760
75b
756
751
74c
747
742
73d
738
733
72e
729
724
71f
71a
715
710
70b
706
702
6fd
6f8
6f3
6ee
6e9
6e5
6e0
6db
6d6
6d2
6cd
6c8
6c4
6bf
6ba
6b5
6b1
6ac
6a8
6a3
69e
69a
695
691
68c
688
683
67f
67a
676
671
66d
668
664
65f
65b
657
652
64e
649
645
641
63c
638
634
630
62b
627
623
61e
61a
616
612
60e
609
605
601
5fd
5f9
5f5
5f0
5ec
5e8
5e4
5e0
5dc
5d8
5d4
5d0
5cc
5c8
5c4
5c0
5bc
5b8
5b4
5b0
5ac
5a8
5a4
5a0
59c
599
595
591
58d
589
585
581
57e
57a
576
572
56f
56b
567
563
560
55c
558
554
551
54d
549
546
542
53e
53b
537
534
530
52c
529
525
522
51e
51b
517
514
510
50c
509
506
502
4ff
4fb
4f8
4f4
4f1
4ed
4ea
4e7
4e3
4e0
4dc
4d9
4d6
4d2
4cf
4cc
4c8
4c5
4c2
4be
4bb
4b8
4b5
4b1
4ae
4ab
4a8
4a4
4a1
49e
49b
498
494
491
48e
48b
488
485
482
47e
47b
478
475
472
46f
46c
469
466
463
460
45d
45a
457
454
451
44e
44b
448
445
442
43f
43c
439
436
433
430
42d
42a
428
425
422
41f
41c
419
416
414
411
40e
40b
408
406
403
400
